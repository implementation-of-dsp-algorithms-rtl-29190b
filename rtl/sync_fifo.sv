// sync_fifo: single-clock FIFO, the sample store of the echo effect.
//
// It has the ports of the FIFO block in the echo model: din, we, re, dout,
// empty, pct_full ("%full") and full. The depth defaults to 2048 words, the
// "2k data samples" of the echo; the 12-bit width is the ADC's. The storage
// is an array written and read on the clock edge, which maps to block RAM.
//
// Timing: a write (we) stores din at the rising edge. A read (re) pops the
// oldest word; it appears on dout one clock later and stays there until the
// next read. A write while full is dropped unless a read happens in the same
// cycle; a read while empty is ignored. pct_full is the fill level in
// quarters of the depth (0: under 1/4, ... 3: 3/4 or more) -- the document
// names the output but not its width, so the 2-bit width is this design's
// choice. clr empties the FIFO synchronously.
module sync_fifo #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned PCT_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic [WIDTH-1:0] din,
  input  logic             we,
  input  logic             re,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [PCT_W-1:0] pct_full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign do_rd = re && !empty;
  assign do_wr = we && (!full || do_rd);

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
    if (do_rd) dout <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (clr) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= nxt(wr_ptr);
      if (do_rd) rd_ptr <= nxt(rd_ptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  // Fill level in fractions of the depth: floor(count * 2^PCT_W / DEPTH),
  // saturated so that a full FIFO reads as the top fraction.
  logic [CW+PCT_W-1:0] frac;
  always_comb begin
    frac = ((CW+PCT_W)'(count) << PCT_W) / (CW+PCT_W)'(DEPTH);
    pct_full = (frac > (CW+PCT_W)'(2**PCT_W - 1)) ? '1 : frac[PCT_W-1:0];
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));
endmodule
