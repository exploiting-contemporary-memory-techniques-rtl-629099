// Testbench of data_sequencer: four streams run different scan patterns (a
// burst-grouped row scan, a vertical scan stepping backwards in x as in a 90
// degree turned array, a three-level scan that revisits rows, and a disabled
// stream). Every request is compared with a reference built from the nested
// loop formula position = handle + i0*s0 + i1*s1 + i2*s2. With ready held high
// a stream must issue one request per cycle; a second run uses random
// back-pressure. Chains of several patterns in one stream must follow on
// without an idle cycle, and a stream whose first pattern is off stays idle.
// A third run nests one pattern in another (the inner one runs at every
// position of the outer one, relative to it) and chains a pattern after the
// pair; the reference expands the pair into a loop over the outer positions.
module tb_data_sequencer;
  import mompda_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  scan_cfg_t  [NSTREAMS-1:0][NSEQ-1:0] cfg;
  logic       [NSTREAMS-1:0] seq_switch;
  int n_switch = 0, exp_switch = 0;
  logic       [NSTREAMS-1:0] req_valid, req_ready;
  burst_req_t [NSTREAMS-1:0] req;
  logic done;
  int checks = 0, failures = 0;
  burst_req_t expq [NSTREAMS][$];
  int cycles;

  data_sequencer dut (.*);

  always #5 clk = ~clk;

  function automatic scan_cfg_t mkcfg(input bit en, input bit we, input int hx, input int hy,
                                      input int dx0, input int dy0, input int n0,
                                      input int dx1, input int dy1, input int n1,
                                      input int dx2, input int dy2, input int n2);
    scan_cfg_t c;
    c = '0;
    c.en = en; c.we = we; c.hx = XW'(hx); c.hy = YW'(hy);
    c.dx[0] = (XW+1)'(dx0); c.dy[0] = (YW+1)'(dy0); c.n[0] = CNTW'(n0);
    c.dx[1] = (XW+1)'(dx1); c.dy[1] = (YW+1)'(dy1); c.n[1] = CNTW'(n1);
    c.dx[2] = (XW+1)'(dx2); c.dy[2] = (YW+1)'(dy2); c.n[2] = CNTW'(n2);
    return c;
  endfunction

  // reference: the loop nest written out directly
  task automatic expect_stream(input int s, input scan_cfg_t c);
    int dx[3], dy[3], n[3];
    bit bm;
    if (!c.en) return;
    for (int l = 0; l < 3; l++) begin
      dx[l] = int'($signed(c.dx[l])); dy[l] = int'($signed(c.dy[l])); n[l] = int'(c.n[l]);
    end
    bm = (dx[0] == 1 && dy[0] == 0);
    for (int i2 = 0; i2 < n[2]; i2++)
      for (int i1 = 0; i1 < n[1]; i1++)
        for (int i0 = 0; i0 < (bm ? 1 : n[0]); i0++) begin
          burst_req_t r;
          r.we  = c.we;
          r.x   = XW'(int'(c.hx) + i0*dx[0] + i1*dx[1] + i2*dx[2]);
          r.y   = YW'(int'(c.hy) + i0*dy[0] + i1*dy[1] + i2*dy[2]);
          r.len = bm ? LENW'(n[0]) : LENW'(1);
          expq[s].push_back(r);
        end
  endtask

  // reference for a stream's pattern list: a pattern followed by a nested one
  // is the outer loop of that pair; the nested pattern runs at each of its
  // positions with its handle relative to it
  task automatic expect_list(input int s);
    int  q;
    bit  first_run;
    q = 0;
    first_run = 1;
    while (q < NSEQ && cfg[s][q].en) begin
      if (q + 1 < NSEQ && cfg[s][q+1].en && cfg[s][q+1].nest) begin
        scan_cfg_t o, c;
        o = cfg[s][q];
        for (int i2 = 0; i2 < int'(o.n[2]); i2++)
          for (int i1 = 0; i1 < int'(o.n[1]); i1++)
            for (int i0 = 0; i0 < int'(o.n[0]); i0++) begin
              c = cfg[s][q+1];
              c.hx = XW'(int'(o.hx) + int'(c.hx) + i0*int'($signed(o.dx[0]))
                         + i1*int'($signed(o.dx[1])) + i2*int'($signed(o.dx[2])));
              c.hy = YW'(int'(o.hy) + int'(c.hy) + i0*int'($signed(o.dy[0]))
                         + i1*int'($signed(o.dy[1])) + i2*int'($signed(o.dy[2])));
              if (!first_run) exp_switch++;
              first_run = 0;
              expect_stream(s, c);
            end
        q += 2;
      end else begin
        if (!first_run) exp_switch++;
        first_run = 0;
        expect_stream(s, cfg[s][q]);
        q++;
      end
    end
  endtask

  bit random_ready;
  always_ff @(posedge clk) begin
    for (int s = 0; s < NSTREAMS; s++) if (rst_n && seq_switch[s]) n_switch++;
    for (int s = 0; s < NSTREAMS; s++)
      if (rst_n && req_valid[s] && req_ready[s]) begin
        checks++;
        if (expq[s].size() == 0) begin
          failures++;
          $display("FAIL stream %0d: unexpected request x=%0d y=%0d", s, req[s].x, req[s].y);
        end else begin
          burst_req_t e;
          e = expq[s].pop_front();
          if (req[s] !== e) begin
            failures++;
            $display("FAIL stream %0d: got we%0d (%0d,%0d) len %0d exp we%0d (%0d,%0d) len %0d",
                     s, req[s].we, req[s].x, req[s].y, req[s].len, e.we, e.x, e.y, e.len);
          end
        end
      end
  end

  always_comb
    for (int s = 0; s < NSTREAMS; s++) req_ready[s] = random_ready ? 1'($urandom_range(1)) : 1'b1;

  task automatic run(input int expect_cycles);
    int most;
    most = 0;
    for (int s = 0; s < NSTREAMS; s++) begin
      expect_list(s);
      if (expq[s].size() > most) most = expq[s].size();
    end
    if (expect_cycles < 0) expect_cycles = most;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    for (int s = 0; s < NSTREAMS; s++) begin
      checks++;
      if (expq[s].size() != 0) begin
        failures++;
        $display("FAIL stream %0d: %0d requests missing", s, expq[s].size());
        expq[s].delete();
      end
    end
    if (expect_cycles > 0) begin
      checks++;
      if (cycles != expect_cycles) begin
        failures++;
        $display("FAIL run took %0d cycles, expected %0d", cycles, expect_cycles);
      end
    end
  endtask

  initial begin
    random_ready = 0;
    cfg = '0;
    cfg[0][0] = mkcfg(1, 0, 5, 0,   1, 0, 40,   0, 2, 4,   0, 0, 1);   // 4 row bursts
    cfg[1][0] = mkcfg(1, 1, 3, 2,   0, 2, 4,   -1, 0, 4,   0, 8, 2);   // 32 single words
    cfg[2][0] = mkcfg(1, 0, 0, 1,   1, 0, 4,    0, 0, 3,   0, 2, 2);   // 6 bursts
    cfg[3][0] = mkcfg(0, 0, 0, 3,   1, 0, 1,    0, 0, 1,   0, 0, 1);   // disabled
    cfg[3][1] = mkcfg(1, 0, 9, 3,   1, 0, 4,    0, 0, 1,   0, 0, 1);   // ignored: first is off
    // chains: stream 0 continues with a 3-word column, stream 2 with two more patterns
    cfg[0][1] = mkcfg(1, 0, 100, 10, 0, 2, 3,   0, 0, 1,   0, 0, 1);
    cfg[2][1] = mkcfg(1, 1, 64, 5,  1, 0, 8,    0, 2, 2,   0, 0, 1);
    cfg[2][2] = mkcfg(1, 0, 3, 9,   -1, 0, 3,   0, 0, 1,   0, 0, 1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(32);
    cfg[0][1] = '0;
    cfg[3][0] = mkcfg(1, 1, 7, 3,   2, 4, 3,    0, 2, 5,   1, 0, 2);   // stepped diagonal, 30 words
    random_ready = 1;
    run(0);
    // nested patterns: stream 1 runs a 2-row burst block at 6 outer positions,
    // then a chained column; stream 2 runs a backward 3-word line at 2 outer
    // positions, then a pattern whose nest bit is ignored (its predecessor is
    // already nested); both at full rate, so the run takes one cycle per request
    cfg = '0;
    cfg[1][0] = mkcfg(1, 0, 10, 20,  0, 4, 3,   40, 0, 2,   0, 0, 1);  // outer: 6 positions
    cfg[1][1] = mkcfg(1, 0, 2, 0,    1, 0, 5,    0, 2, 2,   0, 0, 1);  // nested: 2 bursts
    cfg[1][1].nest = 1;
    cfg[1][2] = mkcfg(1, 1, 50, 0,   0, 2, 3,    0, 0, 1,   0, 0, 1);  // chained: 3 words
    cfg[2][0] = mkcfg(1, 0, 0, 1,    0, 2, 2,    0, 0, 1,   0, 0, 1);  // outer: 2 positions
    cfg[2][1] = mkcfg(1, 1, 3, 0,   -1, 0, 3,    0, 0, 1,   0, 0, 1);  // nested: 3 words
    cfg[2][1].nest = 1;
    cfg[2][2] = mkcfg(1, 0, 7, 5,    1, 0, 9,    0, 0, 1,   0, 0, 1);  // nest bit ignored
    cfg[2][2].nest = 1;
    random_ready = 0;
    run(-1);
    checks++;
    if (n_switch != exp_switch) begin
      failures++;
      $display("FAIL %0d pattern switches, expected %0d", n_switch, exp_switch);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
