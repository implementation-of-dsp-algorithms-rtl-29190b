// adc_if: controller for the 12-bit AD7891 ADC on its parallel bus.
//
// Once per sample period (CLK_HZ / FS_HZ clocks, 50 at the default 50 MHz
// clock and 1 MHz sample rate) the controller runs one conversion:
//   1. WRITE  - only when ch_adc differs from the channel last written (or
//               after reset): cs_ad and wr_ad go low with the channel address
//               driven on db, which loads the ADC's control register.
//   2. CONV   - convst_ad is pulsed low to start a conversion.
//   3. WAIT   - the controller waits for eoc_ad to go low (end of
//               conversion).
//   4. READ   - cs_ad and rd_ad go low; at the end of the strobe the 12-bit
//               result on db is latched and presented on sample/valid.
// Each strobe lasts STROBE_CLKS clocks. After a write, cs_ad and the channel
// address on db are held for one more clock after wr_ad rises (data hold). mode_ad is held high (parallel
// interface mode). adc_clk is the system clock divided by ADC_CLK_DIV. If a
// sample period ends while a conversion is still in progress, that period
// is skipped and 'overrun' pulses for one clock.
//
// The bidirectional bus db is split into db_in, db_out and db_oe; a pad
// (or the board top) joins them. The pin names, the 12-bit bus, the 2-bit
// channel select and the 1 MHz rate are the document's. The order of the
// handshake, active-low strobes, the channel address on db[2:0], two's
// complement results and all strobe lengths are this design's choices
// (they follow the usual AD7891 parallel-mode sequence).
module adc_if
  import audio_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned FS_HZ       = 1_000_000,
  parameter int unsigned STROBE_CLKS = 3,
  parameter int unsigned ADC_CLK_DIV = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  ch_adc,
  // AD7891 pins
  output logic        mode_ad,
  input  logic        eoc_ad,
  output logic        rd_ad,
  output logic        wr_ad,
  output logic        convst_ad,
  output logic        cs_ad,
  output logic        adc_clk,
  input  logic [11:0] db_in,
  output logic [11:0] db_out,
  output logic        db_oe,
  // sample stream
  output logic        valid,
  output sample_t     sample,
  output logic        ch_write,  // pulses when a control-register write starts
  output logic        overrun
);
  localparam int unsigned PERIOD = CLK_HZ / FS_HZ;
  localparam int unsigned PW     = $clog2(PERIOD);
  localparam int unsigned SW     = $clog2(STROBE_CLKS + 1);
  localparam int unsigned DW     = (ADC_CLK_DIV > 2) ? $clog2(ADC_CLK_DIV) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_WRITE, S_WREC, S_CONV, S_WAIT, S_READ
  } state_e;

  state_e        state;
  logic [PW-1:0] period_cnt;
  logic [SW-1:0] strobe_cnt;
  logic          tick;
  logic [1:0]    ch_q;
  logic          ch_ok;
  logic          strobe_done;

  assign mode_ad     = 1'b1;
  assign tick        = (period_cnt == PW'(PERIOD - 1));
  assign strobe_done = (strobe_cnt == SW'(STROBE_CLKS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) period_cnt <= '0;
    else        period_cnt <= tick ? '0 : period_cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      strobe_cnt <= '0;
      ch_q       <= '0;
      ch_ok      <= 1'b0;
      valid      <= 1'b0;
      sample     <= '0;
      ch_write   <= 1'b0;
      overrun    <= 1'b0;
    end else begin
      valid    <= 1'b0;
      ch_write <= 1'b0;
      overrun  <= tick && (state != S_IDLE);
      unique case (state)
        S_IDLE: if (tick) begin
          strobe_cnt <= '0;
          if (!ch_ok || ch_adc != ch_q) begin
            state    <= S_WRITE;
            ch_q     <= ch_adc;
            ch_write <= 1'b1;
          end else begin
            state <= S_CONV;
          end
        end
        S_WRITE: begin
          strobe_cnt <= strobe_cnt + 1'b1;
          if (strobe_done) begin
            state <= S_WREC;
            ch_ok <= 1'b1;
          end
        end
        S_WREC: begin
          strobe_cnt <= '0;
          state      <= S_CONV;
        end
        S_CONV: begin
          strobe_cnt <= strobe_cnt + 1'b1;
          if (strobe_done) state <= S_WAIT;
        end
        S_WAIT: begin
          strobe_cnt <= '0;
          if (!eoc_ad) state <= S_READ;
        end
        S_READ: begin
          strobe_cnt <= strobe_cnt + 1'b1;
          if (strobe_done) begin
            state  <= S_IDLE;
            sample <= sample_t'(db_in);
            valid  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    cs_ad     = !(state inside {S_WRITE, S_WREC, S_READ});
    wr_ad     = !(state == S_WRITE);
    rd_ad     = !(state == S_READ);
    convst_ad = !(state == S_CONV);
    db_oe     = (state inside {S_WRITE, S_WREC});
    db_out    = {10'b0, ch_q};
  end

  // adc_clk: free-running clock at CLK_HZ / ADC_CLK_DIV (ADC_CLK_DIV even).
  logic [DW-1:0] clk_div;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_div <= '0;
      adc_clk <= 1'b0;
    end else if (clk_div == DW'(ADC_CLK_DIV/2 - 1)) begin
      clk_div <= '0;
      adc_clk <= !adc_clk;
    end else begin
      clk_div <= clk_div + 1'b1;
    end
  end

  // Bus rules: never read and write at once; a strobe only with chip select;
  // the FPGA drives db only while writing.
  a_rd_wr_excl: assert property (@(posedge clk) disable iff (!rst_n) rd_ad || wr_ad);
  a_strobe_cs:  assert property (@(posedge clk) disable iff (!rst_n) (!rd_ad || !wr_ad) |-> !cs_ad);
  a_no_drive_on_read: assert property (@(posedge clk) disable iff (!rst_n) !rd_ad |-> !db_oe);

  initial begin
    assert (PERIOD >= 2 * STROBE_CLKS + 4) else $error("adc_if: sample period too short");
    assert (ADC_CLK_DIV >= 2 && ADC_CLK_DIV % 2 == 0) else $error("adc_if: ADC_CLK_DIV must be even");
  end
endmodule
