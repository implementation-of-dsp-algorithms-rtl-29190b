// ad7891_model: behavioural model of a 12-bit parallel-interface ADC of the
// AD7891 kind, for testbenches only (not synthesizable logic).
//
// Protocol modelled: a rising edge of wr_n while cs_n is low loads the
// channel address from db[2:0]. A falling edge of convst_n samples the
// analog value of the selected channel (chan_val) and starts a conversion;
// conv_clks clocks later eoc_n goes low. While cs_n and rd_n are both low the
// result is driven on db_out (db_drive high); the rising edge of rd_n
// returns eoc_n high. Protocol errors are counted: a read before the end of
// conversion, a conversion started during another, bus contention (both
// sides driving), and mode_ad not high (parallel mode).
module ad7891_model (
  input  logic        clk,
  input  logic        mode_ad,
  input  logic        convst_n,
  input  logic        cs_n,
  input  logic        rd_n,
  input  logic        wr_n,
  input  logic [11:0] db_in,      // bus as driven by the controller
  input  logic        db_in_oe,
  output logic        eoc_n,
  output logic [11:0] db_out,
  output logic        db_drive,
  input  logic [11:0] chan_val [4],
  input  int          conv_clks
);
  logic [2:0]  ch_reg = '0;
  logic [11:0] result = '0;
  logic        busy = 1'b0;
  int          cnt = 0;
  logic        convst_q = 1'b1, rd_q = 1'b1, wr_q = 1'b1;
  int          errors = 0, conversions = 0, ch_writes = 0;
  logic [2:0]  conv_ch = '0;

  initial eoc_n = 1'b1;

  assign db_drive = !cs_n && !rd_n;
  assign db_out   = db_drive ? result : 12'h000;

  always @(posedge clk) begin
    convst_q <= convst_n;
    rd_q     <= rd_n;
    wr_q     <= wr_n;
    if (db_drive && db_in_oe) errors++;
    if (!mode_ad) errors++;
    if (wr_q && !wr_n && cs_n) errors++;         // write strobe without chip select
    if (!wr_q && wr_n && !cs_n) begin
      ch_reg <= db_in[2:0];
      ch_writes++;
    end
    if (convst_q && !convst_n) begin
      if (busy) errors++;
      busy    <= 1'b1;
      cnt     <= conv_clks;
      conv_ch <= ch_reg;
      result  <= chan_val[ch_reg[1:0]];
      conversions++;
    end else if (busy) begin
      if (cnt <= 1) begin
        busy  <= 1'b0;
        eoc_n <= 1'b0;
      end else cnt <= cnt - 1;
    end
    if (!cs_n && !rd_n && busy) errors++;        // read during conversion
    if (!rd_q && rd_n) eoc_n <= 1'b1;
  end
endmodule
