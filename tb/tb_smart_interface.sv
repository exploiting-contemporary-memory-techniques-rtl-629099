// Testbench of smart_interface: random traffic through the four read buffers
// (memory side pushes, rALU side pops) and the four write buffers (rALU pushes,
// memory side pops), compared with queue models; fill levels reported to the
// burst control unit (space, count); capture of a popped read word into the
// register file; rALU register writes and the two read ports.
module tb_smart_interface;
  import mompda_pkg::*;

  localparam int NREGS = 16;
  localparam int DEPTH = 64;

  logic clk = 0, rst_n = 0;
  logic  [NSTREAMS-1:0]         mem_rd_push = '0;
  word_t [NMOD-1:0]             mem_rd_data = '0;
  logic  [NSTREAMS-1:0][7:0]    mem_rd_space, mem_wr_count;
  word_t [NSTREAMS-1:0]         mem_wr_head;
  logic  [NSTREAMS-1:0]         mem_wr_pop = '0;
  logic  [NSTREAMS-1:0]         ralu_rd_valid, ralu_rd_pop = '0, ralu_wr_ready, ralu_wr_push = '0;
  word_t [NSTREAMS-1:0]         ralu_rd_data, ralu_wr_data = '0;
  logic                         cap_en = 0;
  logic [$clog2(NSTREAMS)-1:0]  cap_stream = '0;
  logic [$clog2(NREGS)-1:0]     cap_reg = '0;
  logic                         rf_we = 0;
  logic [$clog2(NREGS)-1:0]     rf_waddr = '0;
  word_t                        rf_wdata = '0;
  logic [1:0][$clog2(NREGS)-1:0] rf_raddr = '0;
  word_t [1:0]                  rf_rdata;

  int checks = 0, failures = 0;
  word_t rq [NSTREAMS][$];
  word_t wq [NSTREAMS][$];
  word_t regs_ref [NREGS];

  smart_interface #(.FIFO_DEPTH (DEPTH), .NREGS (NREGS)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int r = 0; r < NREGS; r++) regs_ref[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < NSTREAMS; s++) begin
      chk(mem_rd_space[s] == 8'(DEPTH), "read buffer empty after reset");
      chk(mem_wr_count[s] == 0, "write buffer empty after reset");
    end

    for (int t = 0; t < 3000; t++) begin
      // stimulus for this cycle (the two streams of a module share a read bus:
      // only one of them is pushed per cycle, as the burst controller does)
      for (int m = 0; m < NMOD; m++) mem_rd_data[m] = $urandom;
      for (int s = 0; s < NSTREAMS; s++) begin
        mem_rd_push[s]  = (s % SPM == t % SPM) && (rq[s].size() < DEPTH) && ($urandom_range(2) != 0);
        ralu_rd_pop[s]  = (rq[s].size() != 0) && ($urandom_range(2) == 0);
        ralu_wr_push[s] = (wq[s].size() < DEPTH) && ($urandom_range(2) != 0);
        ralu_wr_data[s] = $urandom;
        mem_wr_pop[s]   = (wq[s].size() != 0) && ($urandom_range(2) == 0);
      end
      cap_en     = $urandom_range(3) == 0;
      cap_stream = $urandom;
      cap_reg    = $urandom;
      rf_we      = $urandom_range(3) == 0;
      rf_waddr   = $urandom;
      rf_wdata   = $urandom;
      rf_raddr[0] = $urandom;
      rf_raddr[1] = $urandom;
      #1;
      // combinational outputs against the models
      for (int s = 0; s < NSTREAMS; s++) begin
        chk(mem_rd_space[s] == 8'(DEPTH - rq[s].size()), "read buffer space");
        chk(mem_wr_count[s] == 8'(wq[s].size()), "write buffer count");
        chk(ralu_rd_valid[s] == (rq[s].size() != 0), "read valid");
        chk(ralu_wr_ready[s] == (wq[s].size() < DEPTH), "write ready");
        if (rq[s].size() != 0) chk(ralu_rd_data[s] == rq[s][0], "read buffer head");
        if (wq[s].size() != 0) chk(mem_wr_head[s] == wq[s][0], "write buffer head");
      end
      chk(rf_rdata[0] == regs_ref[rf_raddr[0]] && rf_rdata[1] == regs_ref[rf_raddr[1]], "register read");
      // model update at the clock edge
      @(posedge clk);
      if (cap_en && ralu_rd_pop[cap_stream]) regs_ref[cap_reg] = rq[cap_stream][0];
      if (rf_we) regs_ref[rf_waddr] = rf_wdata;
      for (int s = 0; s < NSTREAMS; s++) begin
        if (ralu_rd_pop[s]) void'(rq[s].pop_front());
        if (mem_rd_push[s]) rq[s].push_back(mem_rd_data[s / SPM]);
        if (mem_wr_pop[s])  void'(wq[s].pop_front());
        if (ralu_wr_push[s]) wq[s].push_back(ralu_wr_data[s]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
