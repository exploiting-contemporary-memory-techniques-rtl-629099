// Smart memory interface between the two memory module buses and the rALU.
//
// For every address stream it holds a read buffer (memory to rALU) and a write
// buffer (rALU to memory), so bursts run at full speed while the rALU works at
// its own pace; the burst control unit only starts a burst whose words all fit
// (read) or are all present (write). Besides, a register file of NREGS words
// keeps intermediate results and data words that are needed again, such as a
// value that the next scan window position reuses instead of reading it from
// memory a second time. A word popped from a read buffer can be copied into a
// register in the same cycle (cap_en), and the rALU has one write and two
// read ports on the register file.
//
// That the interface holds a register file for intermediate results and reused
// data is from the described machine; the buffers, their depth (FIFO_DEPTH)
// and the register-file size and ports are this design's.
//
// Timing: buffers are show-ahead (ralu_rd_data shows the head word), register
// writes take effect at the next clock, register reads are combinational.
// The buffer levels mem_rd_space and mem_wr_count are 8 bits wide so that
// depths up to 255 fit; at the default depth of 64 their top bit is always 0.
module smart_interface
  import mompda_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned NREGS      = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // memory side (burst control unit)
  input  logic  [NSTREAMS-1:0]         mem_rd_push,
  input  word_t [NMOD-1:0]             mem_rd_data,
  output logic  [NSTREAMS-1:0][7:0]    mem_rd_space,
  output logic  [NSTREAMS-1:0][7:0]    mem_wr_count,
  output word_t [NSTREAMS-1:0]         mem_wr_head,
  input  logic  [NSTREAMS-1:0]         mem_wr_pop,
  // rALU side: stream buffers
  output logic  [NSTREAMS-1:0]         ralu_rd_valid,
  output word_t [NSTREAMS-1:0]         ralu_rd_data,
  input  logic  [NSTREAMS-1:0]         ralu_rd_pop,
  output logic  [NSTREAMS-1:0]         ralu_wr_ready,
  input  logic  [NSTREAMS-1:0]         ralu_wr_push,
  input  word_t [NSTREAMS-1:0]         ralu_wr_data,
  // rALU side: register file
  input  logic                         cap_en,      // copy a popped read word
  input  logic [$clog2(NSTREAMS)-1:0]  cap_stream,
  input  logic [$clog2(NREGS)-1:0]     cap_reg,
  input  logic                         rf_we,
  input  logic [$clog2(NREGS)-1:0]     rf_waddr,
  input  word_t                        rf_wdata,
  input  logic [1:0][$clog2(NREGS)-1:0] rf_raddr,
  output word_t [1:0]                  rf_rdata
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  word_t regs [NREGS];

  for (genvar s = 0; s < NSTREAMS; s++) begin : g_s
    logic [CW-1:0] rcount, rspace, wcount, wspace;

    sync_fifo #(.WIDTH (DW), .DEPTH (FIFO_DEPTH)) u_rd (
      .clk, .rst_n,
      .push    (mem_rd_push[s]),
      .wr_data (mem_rd_data[s / SPM]),
      .pop     (ralu_rd_pop[s]),
      .rd_data (ralu_rd_data[s]),
      .count   (rcount),
      .space   (rspace)
    );

    sync_fifo #(.WIDTH (DW), .DEPTH (FIFO_DEPTH)) u_wr (
      .clk, .rst_n,
      .push    (ralu_wr_push[s]),
      .wr_data (ralu_wr_data[s]),
      .pop     (mem_wr_pop[s]),
      .rd_data (mem_wr_head[s]),
      .count   (wcount),
      .space   (wspace)
    );

    assign ralu_rd_valid[s] = (rcount != '0);
    assign ralu_wr_ready[s] = (wspace != '0);
    assign mem_rd_space[s]  = 8'(rspace);
    assign mem_wr_count[s]  = 8'(wcount);
  end

  // register file: the rALU write port wins over a capture to the same register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      if (cap_en && ralu_rd_pop[cap_stream] && ralu_rd_valid[cap_stream])
        regs[cap_reg] <= ralu_rd_data[cap_stream];
      if (rf_we) regs[rf_waddr] <= rf_wdata;
    end
  end

  assign rf_rdata[0] = regs[rf_raddr[0]];
  assign rf_rdata[1] = regs[rf_raddr[1]];
endmodule
