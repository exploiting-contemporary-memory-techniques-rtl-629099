// Application testbench of mompda_top: the matrix-matrix multiplication and
// the convolution, each at the two problem sizes used for the performance
// comparison (MAT 4 x 4 and 40 x 40, CON 20 and 200 elements), with the data
// arranged as the rearrangement strategy places them.
//
// MAT, C = A * B: B is stored transposed (the exchange of x and y that turns
// its column scan into a row scan), A and B^T share module 0 (rows 4i and
// 4j+2), C goes to module 1 (rows 4i+1). Stream 0 bursts row i of A once per
// j, stream 1 bursts row j of B^T, stream 2 writes row i of C as one burst.
// CON, c_i = sum_s a_s * b_(i-s), i = 0 .. 2N-2: b is stored reversed (the
// mirror in x) with N-1 zeros on each side, so every c_i is the dot product of
// a (row 0) with a contiguous N-word window of the reversed b (row 2) that
// moves one word to the left per output; c is one row of module 1.
//
// A multiply-accumulate rALU model pops one a and one b word per step, keeps
// the running sum in register 2 of the smart interface's register file and
// pushes it to stream 2 after the last term. Results are compared with sums
// computed here, and the run time in cycles must not be below the number of
// words module 0 reads, since its data bus moves one word per cycle.
module tb_workloads;
  import mompda_pkg::*;

  localparam int X0 = 0;

  logic clk = 0, rst_n = 0, start = 0, done;
  scan_cfg_t [NSTREAMS-1:0][NSEQ-1:0] cfg;
  logic [NSTREAMS-1:0]       seq_switch;
  mdram_cmd_t [NMOD-1:0]     md_cmd;
  word_t [NMOD-1:0]          md_wdata, md_rdata;
  logic  [NSTREAMS-1:0]      ralu_rd_valid, ralu_rd_pop, ralu_wr_ready, ralu_wr_push;
  word_t [NSTREAMS-1:0]      ralu_rd_data, ralu_wr_data;
  logic                      cap_en, rf_we;
  logic [1:0]                cap_stream;
  logic [3:0]                cap_reg, rf_waddr;
  word_t                     rf_wdata;
  logic [1:0][3:0]           rf_raddr;
  word_t [1:0]               rf_rdata;
  logic [NMOD-1:0]           stall, split, refresh_done;

  int checks = 0, failures = 0;
  int terms;          // products per result
  int k;              // products done for the current result

  mompda_top dut (.*);

  mdram_model u_mem0 (.clk, .cmd (md_cmd[0]), .wdata (md_wdata[0]), .rdata (md_rdata[0]));
  mdram_model u_mem1 (.clk, .cmd (md_cmd[1]), .wdata (md_wdata[1]), .rdata (md_rdata[1]));

  always #5 clk = ~clk;

  function automatic logic [BANKW+PAGEW+COLW-1:0] loc(input int x, input int y);
    return {BANKW'(((y / 2) + (x / 32)) % 32), PAGEW'((x / 32) * 16 + (y / 64)), COLW'(x % 32)};
  endfunction

  // rALU model: multiply-accumulate in register 2
  always_comb begin
    logic go, last;
    go   = rst_n && ralu_rd_valid[0] && ralu_rd_valid[1] && ralu_wr_ready[2];
    last = (k == terms - 1);
    ralu_rd_pop     = '0;
    ralu_wr_push    = '0;
    ralu_wr_data    = '0;
    ralu_rd_pop[0]  = go;
    ralu_rd_pop[1]  = go;
    rf_raddr[0]     = 4'd2;
    rf_raddr[1]     = 4'd0;
    rf_we           = go;
    rf_waddr        = 4'd2;
    rf_wdata        = last ? '0 : ((k == 0) ? '0 : rf_rdata[0]) + ralu_rd_data[0] * ralu_rd_data[1];
    ralu_wr_push[2] = go && last;
    ralu_wr_data[2] = ((k == 0) ? '0 : rf_rdata[0]) + ralu_rd_data[0] * ralu_rd_data[1];
    cap_en          = 1'b0;
    cap_stream      = '0;
    cap_reg         = '0;
  end

  always_ff @(posedge clk)
    if (!rst_n || start) k <= 0;
    else if (ralu_rd_pop[0]) k <= (k == terms - 1) ? 0 : k + 1;

  function automatic scan_cfg_t scan(input bit we, input int hx, input int hy,
                                     input int dx0, input int n0, input int dx1, input int dy1,
                                     input int n1, input int dy2, input int n2);
    scan_cfg_t c;
    c = '0;
    c.en = 1; c.we = we; c.hx = XW'(hx); c.hy = YW'(hy);
    c.dx[0] = (XW+1)'(dx0); c.n[0] = CNTW'(n0);
    c.dx[1] = (XW+1)'(dx1); c.dy[1] = (YW+1)'(dy1); c.n[1] = CNTW'(n1);
    c.dy[2] = (YW+1)'(dy2); c.n[2] = CNTW'(n2);
    return c;
  endfunction


  task automatic run(input string name, input int bound, output int cycles);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles < bound) begin
      failures++;
      $display("FAIL %s finished in %0d cycles, fewer than the %0d words module 0 must read", name, cycles, bound);
    end
    $display("%s: %0d cycles (%0d ns at 15 ns), module-0 read words %0d", name, cycles,
             cycles * 15, bound);
  endtask

  task automatic mat(input int n);
    int a [][], b [][];
    int bound, cycles;
    a = new[n]; b = new[n];
    for (int i = 0; i < n; i++) begin
      a[i] = new[n]; b[i] = new[n];
      for (int j = 0; j < n; j++) begin
        a[i][j] = int'($urandom_range(1000)) - 500;
        b[i][j] = int'($urandom_range(1000)) - 500;
      end
    end
    for (int i = 0; i < n; i++)
      for (int s = 0; s < n; s++) begin
        u_mem0.poke(loc(X0 + s, 4 * i),     word_t'(a[i][s]));
        u_mem0.poke(loc(X0 + s, 4 * i + 2), word_t'(b[s][i]));   // B transposed
      end
    terms  = n;
    cfg[0][0] = scan(0, X0, 0, 1, n, 0, 0, n, 4, n);     // row i of A, once per j
    cfg[1][0] = scan(0, X0, 2, 1, n, 0, 4, n, 0, n);     // row j of B^T
    cfg[2][0] = scan(1, X0, 1, 1, n, 0, 4, n, 0, 1);     // row i of C
    cfg[3][0] = '0;
    bound  = 2 * n * n * n;                          // words over module 0's data bus
    run($sformatf("MAT %0dx%0d", n, n), bound, cycles);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        int e;
        e = 0;
        for (int s = 0; s < n; s++) e += a[i][s] * b[s][j];
        checks++;
        if (u_mem1.peek(loc(X0 + j, 4 * i + 1)) !== word_t'(e)) begin
          failures++;
          $display("FAIL MAT %0d: c[%0d][%0d] = %0d, expected %0d", n, i, j,
                   $signed(u_mem1.peek(loc(X0 + j, 4 * i + 1))), e);
        end
      end
  endtask

  task automatic con(input int n);
    int a [], b [];
    int bound, cycles;
    a = new[n]; b = new[n];
    for (int i = 0; i < n; i++) begin
      a[i] = int'($urandom_range(1000)) - 500;
      b[i] = int'($urandom_range(1000)) - 500;
    end
    for (int x = 0; x < 3 * n - 2; x++) u_mem0.poke(loc(X0 + x, 2), '0);
    for (int s = 0; s < n; s++) begin
      u_mem0.poke(loc(X0 + s, 0), word_t'(a[s]));
      u_mem0.poke(loc(X0 + 2 * n - 2 - s, 2), word_t'(b[s]));  // reversed, padded
    end
    terms  = n;
    cfg[0][0] = scan(0, X0, 0, 1, n, 0, 0, 2 * n - 1, 0, 1);
    cfg[1][0] = scan(0, X0 + 2 * n - 2, 2, 1, n, -1, 0, 2 * n - 1, 0, 1);
    cfg[2][0] = scan(1, X0, 1, 1, 2 * n - 1, 0, 0, 1, 0, 1);
    cfg[3][0] = '0;
    bound = 2 * n * (2 * n - 1);                        // words over module 0's data bus
    run($sformatf("CON %0d", n), bound, cycles);
    for (int i = 0; i < 2 * n - 1; i++) begin
      int e;
      e = 0;
      for (int s = 0; s < n; s++)
        if (i - s >= 0 && i - s < n) e += a[s] * b[i - s];
      checks++;
      if (u_mem1.peek(loc(X0 + i, 1)) !== word_t'(e)) begin
        failures++;
        $display("FAIL CON %0d: c[%0d] = %0d, expected %0d", n, i, $signed(u_mem1.peek(loc(X0 + i, 1))), e);
      end
    end
  endtask

  initial begin
    cfg = '0;
    terms = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    mat(4);
    con(20);
    mat(40);
    con(200);
    checks++;
    if (u_mem0.errors != 0 || u_mem1.errors != 0) begin
      failures++;
      $display("FAIL MDRAM protocol errors: %0d, %0d", u_mem0.errors, u_mem1.errors);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
