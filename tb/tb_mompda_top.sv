// End-to-end testbench of mompda_top at its default parameters.
//
// Runs the generic two-input, two-output application c = a * b, d = a + b on
// W x H arrays. The arrays are arranged as the data rearrangement places such
// a loop: the consumed arrays a and b share module 0 (rows 4i and 4i+2, i.e.
// vertically aligned), the generated arrays c and d share module 1 (rows 4i+1
// and 4i+3). Streams 0 and 1 read a and b in row bursts, stream 2 writes c in
// row bursts, stream 3 writes d word by word (its innermost step is the null
// vector) as a chain of two scan patterns (first and second half of the
// rows). Stream 2 runs as a nested pair: an outer pattern visits the first
// word of each row of c and a one-row burst pattern runs relative to it. So
// burst and single-word access, pattern chaining and nesting are all used.
// Rows start at x = 5 and are 40 words long, so every row burst crosses a
// 32-word bank boundary and is split.
//
// A small rALU model takes a and b, writes c = a * b at once, keeps a in the
// smart interface's register file and forms d = a + b one cycle later from
// that register; it pauses at random to make the buffers fill and bursts
// stall. After done, the memories are compared word by word with c and d
// computed here. Every mechanism (split, refresh, stall, single-word access,
// register reuse, parallel module traffic, overlapping bank cycles, use of
// many banks, pattern chaining and nesting) must be seen.
module tb_mompda_top;
  import mompda_pkg::*;

  localparam int W  = 40;
  localparam int H  = 16;
  localparam int X0 = 5;

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
  int n_switch = 0, n_nest = 0, n_split = 0, n_refresh = 0, n_stall = 0, n_single = 0, n_reuse = 0, n_parallel = 0;
  int cycles = 0;

  mompda_top dut (.*);

  mdram_model u_mem0 (.clk, .cmd (md_cmd[0]), .wdata (md_wdata[0]), .rdata (md_rdata[0]));
  mdram_model u_mem1 (.clk, .cmd (md_cmd[1]), .wdata (md_wdata[1]), .rdata (md_rdata[1]));

  always #5 clk = ~clk;

  function automatic logic [BANKW+PAGEW+COLW-1:0] loc(input int x, input int y);
    return {BANKW'(((y / 2) + (x / 32)) % 32), PAGEW'((x / 32) * 16 + (y / 64)), COLW'(x % 32)};
  endfunction
  function automatic word_t a_val(input int i, input int j); return word_t'(i * 1000 + j * 7 + 3); endfunction
  function automatic word_t b_val(input int i, input int j); return word_t'(j * 513 + i * 11 + 1); endfunction

  function automatic scan_cfg_t row_scan(input bit we, input int y0, input bit single, input int rows);
    scan_cfg_t c;
    c = '0;
    c.en = 1; c.we = we; c.hx = XW'(X0); c.hy = YW'(y0);
    if (!single) begin
      c.dx[0] = 1;            c.n[0] = CNTW'(W);     // along the row: one burst
      c.dy[1] = 4;            c.n[1] = CNTW'(rows);  // next row of this array
      c.n[2]  = 1;
    end else begin
      c.n[0]  = 1;                                   // null innermost step: single words
      c.dx[1] = 1;            c.n[1] = CNTW'(W);
      c.dy[2] = 4;            c.n[2] = CNTW'(rows);
    end
    return c;
  endfunction

  // rALU model: stage 1 takes a and b, writes c and captures a in register 1;
  // stage 2 reads register 1 and writes d = a + b
  logic  stage2;
  word_t b_hold;
  bit    pause;
  always_comb begin
    logic go;
    go = !pause && !stage2 && ralu_rd_valid[0] && ralu_rd_valid[1] && ralu_wr_ready[2];
    ralu_rd_pop     = '0;
    ralu_wr_push    = '0;
    ralu_wr_data    = '0;
    ralu_rd_pop[0]  = go;
    ralu_rd_pop[1]  = go;
    ralu_wr_push[2] = go;
    ralu_wr_data[2] = ralu_rd_data[0] * ralu_rd_data[1];
    cap_en          = go;
    cap_stream      = 2'd0;
    cap_reg         = 4'd1;
    rf_raddr[0]     = 4'd1;
    rf_raddr[1]     = 4'd0;
    ralu_wr_push[3] = stage2 && ralu_wr_ready[3];
    ralu_wr_data[3] = rf_rdata[0] + b_hold;
    rf_we           = 1'b0;
    rf_waddr        = '0;
    rf_wdata        = '0;
  end

  always_ff @(posedge clk) begin
    pause <= ($urandom_range(7) == 0);
    if (!rst_n) stage2 <= 1'b0;
    else if (ralu_rd_pop[0]) begin
      stage2 <= 1'b1;
      b_hold <= ralu_rd_data[1];
    end else if (ralu_wr_push[3]) begin
      stage2 <= 1'b0;
      n_reuse++;
    end
  end

  // mechanism counters
  int open_banks [NMOD];
  bit busy_now   [NMOD];
  int n_overlap = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      n_split   += int'(split[0]) + int'(split[1]);
      n_switch  += int'(seq_switch[3]);
      n_nest    += int'(seq_switch[2]);
      for (int q = 0; q < 2; q++)
        if (seq_switch[q]) begin
          failures++;
          $display("FAIL stream %0d switched patterns but has only one", q);
        end
      n_refresh += int'(refresh_done[0]) + int'(refresh_done[1]);
      n_stall   += int'(stall[0]) + int'(stall[1]);
      if (md_cmd[1].op == MD_WR && md_cmd[1].blen == 1) n_single++;
      // a bank is busy from its ACT up to and including its PRE
      for (int m = 0; m < NMOD; m++) begin
        if (md_cmd[m].op == MD_ACT) open_banks[m]++;
        busy_now[m] = open_banks[m] != 0;
        if (open_banks[m] > 1) n_overlap++;
        if (md_cmd[m].op == MD_PRE) open_banks[m]--;
      end
      if (busy_now[0] && busy_now[1]) n_parallel++;
    end
  end

  task automatic mechanism(input string name, input int n);
    checks++;
    $display("%-26s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    // data map: a and b aligned in module 0, c and d will go to module 1
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) begin
        u_mem0.poke(loc(X0 + j, 4 * i),     a_val(i, j));
        u_mem0.poke(loc(X0 + j, 4 * i + 2), b_val(i, j));
      end
    // d is written by a chain of two patterns: first half, then second half
    cfg = '0;
    cfg[0][0] = row_scan(0, 0, 0, H);
    cfg[1][0] = row_scan(0, 2, 0, H);
    // c is written by a nested pair: an outer pattern steps down the rows of c,
    // and at each of its positions a one-row burst pattern runs relative to it
    cfg[2][0] = '0;
    cfg[2][0].en = 1; cfg[2][0].we = 1; cfg[2][0].hx = XW'(X0); cfg[2][0].hy = YW'(1);
    cfg[2][0].dy[0] = 4; cfg[2][0].n[0] = CNTW'(H); cfg[2][0].n[1] = 1; cfg[2][0].n[2] = 1;
    cfg[2][1] = row_scan(1, 0, 0, 1);
    cfg[2][1].hx = '0;
    cfg[2][1].nest = 1;
    cfg[3][0] = row_scan(1, 3, 1, H / 2);
    cfg[3][1] = row_scan(1, 3 + 4 * (H / 2), 1, H - H / 2);

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (!done) begin failures++; $display("FAIL done low while idle"); end
    start = 1;
    @(negedge clk);
    start = 0;
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done high right after start"); end
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    $display("operation finished after %0d cycles", cycles);

    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) begin
        word_t c_got, d_got, c_exp, d_exp;
        c_exp = a_val(i, j) * b_val(i, j);
        d_exp = a_val(i, j) + b_val(i, j);
        c_got = u_mem1.peek(loc(X0 + j, 4 * i + 1));
        d_got = u_mem1.peek(loc(X0 + j, 4 * i + 3));
        checks += 2;
        if (c_got !== c_exp) begin
          failures++;
          $display("FAIL c[%0d][%0d] = %h, expected %h", i, j, c_got, c_exp);
        end
        if (d_got !== d_exp) begin
          failures++;
          $display("FAIL d[%0d][%0d] = %h, expected %h", i, j, d_got, d_exp);
        end
      end

    checks++;
    if (u_mem0.errors != 0 || u_mem1.errors != 0) begin
      failures++;
      $display("FAIL MDRAM protocol errors: %0d, %0d", u_mem0.errors, u_mem1.errors);
    end
    // the reads of a and b: 2 * H rows, each one ACT/RD per 32-word segment touched
    checks++;
    if (u_mem0.n_rd != 4 * H) begin
      failures++;
      $display("FAIL module 0 issued %0d read bursts, expected %0d", u_mem0.n_rd, 4 * H);
    end
    mechanism("burst splits", n_split);
    mechanism("chained scan patterns", n_switch);
    mechanism("nested pattern runs", n_nest);
    checks++;
    if (n_switch != 1 || n_nest != H - 1) begin
      failures++;
      $display("FAIL %0d chained and %0d nested pattern starts, expected 1 and %0d", n_switch, n_nest, H - 1);
    end
    mechanism("refreshes", n_refresh);
    mechanism("stalled burst cycles", n_stall);
    mechanism("single-word writes", n_single);
    mechanism("register reuses", n_reuse);
    mechanism("parallel module cycles", n_parallel);
    mechanism("overlapped bank cycles", n_overlap);
    mechanism("banks used on module 0", $countones(u_mem0.banks_used) > 1 ? $countones(u_mem0.banks_used) : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
