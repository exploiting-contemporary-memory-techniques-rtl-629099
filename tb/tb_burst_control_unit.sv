// Testbench of burst_control_unit with a behavioural MDRAM on each module.
//
// Requests are driven directly on the four streams. The testbench keeps its
// own copy of the address mapping to preload the memories and to check write
// results, and models the smart-interface buffers as queues. It checks read
// data order and values, written memory contents, that a run of 40 words from
// x = 5 is cut into bursts of 27 and 13 words at the 32-word boundary, that a
// read bank cycle (ACT to PRE) takes 5+n cycles and a write 4+n, that a read
// whose buffer lacks room waits (stall) until room appears, that bank cycles of
// different banks overlap so that a 96-word run over three banks keeps the data
// bus busy in 96 consecutive cycles, that refresh commands are issued, and that
// the MDRAM protocol is never violated.
module tb_burst_control_unit;
  import mompda_pkg::*;

  localparam int REFI = 300;

  logic clk = 0, rst_n = 0;
  logic       [NSTREAMS-1:0]   req_valid = '0, req_ready;
  burst_req_t [NSTREAMS-1:0]   req = '0;
  logic [NSTREAMS-1:0][7:0]    rd_space;
  logic [NSTREAMS-1:0][7:0]    wr_count;
  word_t [NSTREAMS-1:0]        wr_head;
  logic  [NSTREAMS-1:0]        rd_push, wr_pop;
  word_t [NMOD-1:0]            rd_data;
  mdram_cmd_t [NMOD-1:0]       md_cmd;
  word_t [NMOD-1:0]            md_wdata, md_rdata;
  logic idle;
  logic [NMOD-1:0] stall, split, refresh_done;

  int checks = 0, failures = 0;
  int space_cfg [NSTREAMS];
  word_t rexp [NSTREAMS][$];
  word_t wq   [NSTREAMS][$];
  int blens [NMOD][$];
  int n_stall [NMOD], n_split [NMOD], n_ref [NMOD];
  longint cyc = 0;

  burst_control_unit #(.REFI (REFI)) dut (.*);

  for (genvar m = 0; m < NMOD; m++) begin : g_mem
    mdram_model u_mem (.clk, .cmd (md_cmd[m]), .wdata (md_wdata[m]), .rdata (md_rdata[m]));
  end

  always #5 clk = ~clk;

  // reference address mapping
  function automatic logic [BANKW+PAGEW+COLW-1:0] loc(input int x, input int y);
    int b, p;
    b = ((y / 2) + (x / 32)) % 32;
    p = (x / 32) * 16 + (y / 64);
    return {BANKW'(b), PAGEW'(p), COLW'(x % 32)};
  endfunction

  function automatic word_t pattern(input int x, input int y);
    return word_t'(32'hA500_0000 + y * 4096 + x);
  endfunction

  task automatic preload(input int x0, input int y, input int len);
    for (int i = 0; i < len; i++)
      if (y % 2 == 0) g_mem[0].u_mem.poke(loc(x0 + i, y), pattern(x0 + i, y));
      else            g_mem[1].u_mem.poke(loc(x0 + i, y), pattern(x0 + i, y));
  endtask

  // buffers of the smart interface, as queues
  always_comb
    for (int s = 0; s < NSTREAMS; s++) begin
      rd_space[s] = 8'(space_cfg[s]);
      wr_count[s] = 8'(wq[s].size());
      wr_head[s]  = (wq[s].size() != 0) ? wq[s][0] : '0;
    end

  // command monitor: bank cycle lengths, burst sizes, refresh
  longint act_at [NMOD][NBANKS];
  bit     is_wr  [NMOD][NBANKS];
  int     cur_n  [NMOD][NBANKS];
  int     n_overlap = 0;
  int     open_cnt [NMOD];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int m = 0; m < NMOD && rst_n; m++) begin
      if (stall[m]) n_stall[m]++;
      if (split[m]) n_split[m]++;
      case (md_cmd[m].op)
        MD_ACT: begin
          act_at[m][md_cmd[m].bank] = cyc;
          open_cnt[m]++;
          if (open_cnt[m] > 1) n_overlap++;
        end
        MD_RD, MD_WR: begin
          is_wr[m][md_cmd[m].bank] = (md_cmd[m].op == MD_WR);
          cur_n[m][md_cmd[m].bank] = int'(md_cmd[m].blen);
          blens[m].push_back(int'(md_cmd[m].blen));
        end
        MD_PRE: begin
          int expect_len, b;
          b = int'(md_cmd[m].bank);
          open_cnt[m]--;
          expect_len = is_wr[m][b] ? 4 + cur_n[m][b] : 5 + cur_n[m][b];
          checks++;
          if (int'(cyc - act_at[m][b] + 1) != expect_len) begin
            failures++;
            $display("FAIL module %0d: %s burst of %0d took %0d cycles, expected %0d", m,
                     is_wr[m][b] ? "write" : "read", cur_n[m][b], cyc - act_at[m][b] + 1, expect_len);
          end
        end
        MD_REF: n_ref[m]++;
        default: ;
      endcase
    end
    for (int s = 0; s < NSTREAMS && rst_n; s++) begin
      if (rd_push[s]) begin
        checks++;
        if (rexp[s].size() == 0) begin
          failures++;
          $display("FAIL stream %0d: unexpected read word", s);
        end else begin
          word_t e;
          e = rexp[s].pop_front();
          if (rd_data[s / SPM] !== e) begin
            failures++;
            $display("FAIL stream %0d: read %h expected %h", s, rd_data[s / SPM], e);
          end
        end
      end
      if (wr_pop[s]) void'(wq[s].pop_front());
    end
  end

  task automatic issue(input int s, input bit we, input int x, input int y, input int len);
    @(negedge clk);
    req[s] = '{we: we, x: XW'(x), y: YW'(y), len: LENW'(len)};
    req_valid[s] = 1'b1;
    do @(posedge clk); while (!req_ready[s]);
    @(negedge clk);
    req_valid[s] = 1'b0;
  endtask

  task automatic expect_read(input int s, input int x0, input int y, input int len);
    preload(x0, y, len);
    for (int i = 0; i < len; i++) rexp[s].push_back(pattern(x0 + i, y));
  endtask

  task automatic give_write(input int s, input int x0, input int y, input int len);
    for (int i = 0; i < len; i++) wq[s].push_back(~pattern(x0 + i, y));
  endtask

  task automatic check_written(input int x0, input int y, input int len);
    for (int i = 0; i < len; i++) begin
      word_t got;
      got = (y % 2 == 0) ? g_mem[0].u_mem.peek(loc(x0 + i, y)) : g_mem[1].u_mem.peek(loc(x0 + i, y));
      checks++;
      if (got !== ~pattern(x0 + i, y)) begin
        failures++;
        $display("FAIL write x=%0d y=%0d: memory holds %h", x0 + i, y, got);
      end
    end
  endtask

  task automatic wait_idle();
    repeat (2) @(posedge clk);
    while (!idle) @(posedge clk);
    repeat (RD_WAIT) @(posedge clk);
  endtask
  localparam int RD_WAIT = 4;

  initial begin
    for (int s = 0; s < NSTREAMS; s++) space_cfg[s] = 64;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // split run on module 0 with a write on the same module, parallel to module 1
    expect_read(0, 5, 0, 40);
    give_write(1, 0, 2, 8);
    expect_read(2, 64, 1, 32);
    give_write(3, 3, 3, 1);
    fork
      issue(0, 0, 5, 0, 40);
      issue(1, 1, 0, 2, 8);
      issue(2, 0, 64, 1, 32);
      issue(3, 1, 3, 3, 1);
    join
    wait_idle();
    check_written(0, 2, 8);
    check_written(3, 3, 1);
    checks++;
    if (!(blens[0].size() == 3 && blens[0][0] + blens[0][1] + blens[0][2] == 48 &&
          (27 inside {blens[0][0], blens[0][1], blens[0][2]}) &&
          (13 inside {blens[0][0], blens[0][1], blens[0][2]}))) begin
      failures++;
      $display("FAIL module 0 burst lengths %p, expected 27, 13 and 8", blens[0]);
    end
    checks++;
    if (n_split[0] == 0) begin failures++; $display("FAIL no split reported"); end

    // stall: a 16-word read with room for 8 only
    space_cfg[2] = 8;
    expect_read(2, 0, 5, 16);
    issue(2, 0, 0, 5, 16);
    repeat (40) @(posedge clk);
    checks++;
    if (rexp[2].size() != 16 || n_stall[1] == 0) begin
      failures++;
      $display("FAIL read started without buffer room or no stall reported");
    end
    space_cfg[2] = 64;
    wait_idle();
    checks++;
    if (rexp[2].size() != 0) begin failures++; $display("FAIL stalled read never completed"); end

    // long write run crossing several segments on module 1, then read it back
    give_write(3, 30, 7, 70);
    issue(3, 1, 30, 7, 70);
    wait_idle();
    check_written(30, 7, 70);

    // back-to-back reads of consecutive segments: the data bus must not idle
    begin
      longint t0, t1;
      int words;
      expect_read(0, 0, 4, 96);
      // start right after a refresh so that none falls inside the run
      while (!refresh_done[0]) @(posedge clk);
      fork
        issue(0, 0, 0, 4, 96);
        begin
          words = 0;
          while (!rd_push[0]) @(posedge clk);
          t0 = cyc;
          while (words < 96) begin
            if (rd_push[0]) words++;
            @(posedge clk);
          end
          t1 = cyc;
        end
      join
      checks++;
      if (t1 - t0 != 96) begin
        failures++;
        $display("FAIL 96 words over 3 banks took %0d data cycles, expected 96", t1 - t0);
      end
      wait_idle();
      checks++;
      if (n_overlap == 0) begin failures++; $display("FAIL bank cycles never overlapped"); end
    end

    // refresh must have been issued on both modules by now
    while (cyc < 2 * REFI) @(posedge clk);
    wait_idle();
    for (int m = 0; m < NMOD; m++) begin
      checks++;
      if (n_ref[m] == 0) begin failures++; $display("FAIL module %0d saw no refresh", m); end
    end
    checks++;
    if (g_mem[0].u_mem.errors != 0 || g_mem[1].u_mem.errors != 0) begin
      failures++;
      $display("FAIL MDRAM protocol errors: %0d, %0d", g_mem[0].u_mem.errors, g_mem[1].u_mem.errors);
    end
    for (int s = 0; s < NSTREAMS; s++) begin
      checks++;
      if (rexp[s].size() != 0 || wq[s].size() != 0) begin
        failures++;
        $display("FAIL stream %0d: words left over", s);
      end
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
