// Synchronous first-in first-out buffer with show-ahead output.
//
// rd_data always shows the oldest word; pop removes it, push appends wr_data.
// Push and pop may happen in the same cycle. count and space report the fill
// level. Pushing into a full or popping from an empty buffer is a protocol
// error and is checked by assertions; such operations are ignored.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       pop,
  output logic [WIDTH-1:0]           rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [$clog2(DEPTH+1)-1:0] space
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign do_push = push && (count < ($bits(count))'(DEPTH));
  assign do_pop  = pop && (count != '0);
  assign rd_data = mem[rp];
  assign space   = ($bits(count))'(DEPTH) - count;

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + ($bits(count))'(do_push) - ($bits(count))'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> count < ($bits(count))'(DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> count != '0);
endmodule
