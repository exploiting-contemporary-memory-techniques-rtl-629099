// Scan-pattern address generator for one address stream of the data sequencer.
//
// The stream walks the scan window handle over the 2-D data memory as a nest of
// LEVELS loops: position = handle + i0*s0 + i1*s1 + i2*s2, with loop i0 the
// innermost, scan step vectors s_l = (dx[l], dy[l]) and counts n[l]. When the
// innermost step is (+1, 0) the whole inner loop is one run of consecutive
// words along x and is issued as a single burst request of n[0] words;
// otherwise every position is a one-word request. Positions are updated
// incrementally (no multipliers).
//
// Up to NSEQ scan patterns form a list that is worked through in order; the
// first disabled pattern ends it. A pattern k+1 whose nest bit is set is
// nested in pattern k: pattern k then issues no requests itself, and at each of
// its positions (all its levels stepped one position at a time) pattern k+1
// runs completely, with its handle taken relative to that position. After the
// pair, the list continues with pattern k+2 (concatenation). The next pattern,
// or the next run of a nested pattern, follows the last request without an idle
// cycle, and seq_switch pulses in the cycle it starts. A nest bit on pattern 0,
// or on a pattern whose predecessor is itself nested, is ignored, so nesting is
// one deep.
//
// Generating addresses from a handle, scan steps and loop limits, and
// concatenating and nesting sequences, follow the described sequencer; the
// burst grouping, the number of levels and patterns, the one-deep nesting with
// a relative handle and the request handshake are this design's choices.
//
// Interface: pulse start (with cfg stable while busy) to begin; requests leave
// on req_valid/req_ready, one per accepted cycle; busy is high from the cycle
// after start until the last request is accepted. A stream whose first
// pattern has en low does nothing.
module scan_gen
  import mompda_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  scan_cfg_t [NSEQ-1:0]  cfg,
  output logic                  req_valid,
  input  logic                  req_ready,
  output burst_req_t            req,
  output logic                  busy,
  output logic                  seq_switch   // pulses when a pattern (re)starts after the first
);
  localparam int unsigned SW = (NSEQ > 1) ? $clog2(NSEQ) : 1;

  logic [SW-1:0]               seq;     // pattern that issues requests
  logic                        nested;  // seq runs inside pattern seq-1
  // fields of the running pattern that are used while it runs
  logic                        c_we;
  logic [LEVELS-1:0][XW:0]     c_dx;
  logic [LEVELS-1:0][YW:0]     c_dy;
  logic [LEVELS-1:0][CNTW-1:0] c_n;
  logic [LEVELS-1:0][CNTW-1:0] idx;
  // position at the start of each loop level (x, y)
  logic [LEVELS-1:0][XW-1:0]   px;
  logic [LEVELS-1:0][YW-1:0]   py;
  logic                        burst_mode;
  int unsigned                 first;   // lowest level that is stepped per request

  // outer pattern of a nested pair: its loop state and the step to its next position
  logic [SW-1:0]               oseq;
  logic [LEVELS-1:0][CNTW-1:0] oidx, oidx_n;
  logic [LEVELS-1:0][XW-1:0]   opx, opx_n;
  logic [LEVELS-1:0][YW-1:0]   opy, opy_n;
  logic                        o_done;

  // entry into the next pattern of the list: pattern 0 on start, seq+1 later
  int unsigned                 ent;
  logic                        ent_valid, ent_outer;
  logic [SW-1:0]               ent_seq;
  xcoord_t                     ent_hx;
  ycoord_t                     ent_hy;

  assign c_we       = cfg[seq].we;
  assign c_dx       = cfg[seq].dx;
  assign c_dy       = cfg[seq].dy;
  assign c_n        = cfg[seq].n;
  assign burst_mode = (c_dx[0] == (XW+1)'(1)) && (c_dy[0] == '0);
  assign first      = burst_mode ? 1 : 0;
  assign oseq       = seq - 1'b1;

  always_comb begin
    ent       = busy ? 32'(seq) + 1 : 0;
    ent_valid = (ent < NSEQ) && cfg[ent % NSEQ].en;
    ent_outer = (ent + 1 < NSEQ) && cfg[(ent + 1) % NSEQ].en && cfg[(ent + 1) % NSEQ].nest;
    ent_seq   = ent_outer ? SW'(ent + 1) : SW'(ent);
    ent_hx    = cfg[ent % NSEQ].hx + (ent_outer ? cfg[(ent + 1) % NSEQ].hx : '0);
    ent_hy    = cfg[ent % NSEQ].hy + (ent_outer ? cfg[(ent + 1) % NSEQ].hy : '0);
  end

  // next position of the outer pattern: every level is stepped per position
  always_comb begin
    o_done = 1'b1;
    oidx_n = oidx;
    opx_n  = opx;
    opy_n  = opy;
    for (int l = 0; l < LEVELS; l++) begin
      if (o_done && (oidx[l] + 1'b1 < cfg[oseq].n[l])) begin
        o_done    = 1'b0;
        oidx_n[l] = oidx[l] + 1'b1;
        for (int k = 0; k <= l; k++) begin
          opx_n[k] = opx[l] + XW'(cfg[oseq].dx[l]);
          opy_n[k] = opy[l] + YW'(cfg[oseq].dy[l]);
        end
        for (int k = 0; k < l; k++) oidx_n[k] = '0;
      end
    end
  end

  assign req_valid = busy;
  assign req.we    = c_we;
  assign req.x     = px[0];
  assign req.y     = py[0];
  assign req.len   = burst_mode ? LENW'(c_n[0]) : LENW'(1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      seq        <= '0;
      nested     <= 1'b0;
      idx        <= '0;
      px         <= '0;
      py         <= '0;
      oidx       <= '0;
      opx        <= '0;
      opy        <= '0;
      seq_switch <= 1'b0;
    end else begin
      seq_switch <= 1'b0;
      if (!busy) begin
        if (start && ent_valid) begin
          busy   <= 1'b1;
          seq    <= ent_seq;
          nested <= ent_outer;
          idx    <= '0;
          oidx   <= '0;
          for (int l = 0; l < LEVELS; l++) begin
            px[l]  <= ent_hx;
            py[l]  <= ent_hy;
            opx[l] <= cfg[0].hx;
            opy[l] <= cfg[0].hy;
          end
        end
      end else if (req_ready) begin
        // advance the lowest level that has iterations left, reset those below
        logic done_all;
        done_all = 1'b1;
        for (int l = 0; l < LEVELS; l++) begin
          if (done_all && l >= first) begin
            if (idx[l] + 1'b1 < c_n[l]) begin
              done_all = 1'b0;
              idx[l]   <= idx[l] + 1'b1;
              for (int k = 0; k <= l; k++) begin
                px[k] <= px[l] + XW'(c_dx[l]);
                py[k] <= py[l] + YW'(c_dy[l]);
              end
              for (int k = 0; k < l; k++) idx[k] <= '0;
            end
          end
        end
        if (done_all) begin
          idx <= '0;
          if (nested && !o_done) begin
            // run the nested pattern again at the outer pattern's next position
            seq_switch <= 1'b1;
            oidx       <= oidx_n;
            opx        <= opx_n;
            opy        <= opy_n;
            for (int l = 0; l < LEVELS; l++) begin
              px[l] <= opx_n[0] + cfg[seq].hx;
              py[l] <= opy_n[0] + cfg[seq].hy;
            end
          end else if (ent_valid) begin
            // concatenate the next pattern of the list
            seq_switch <= 1'b1;
            seq        <= ent_seq;
            nested     <= ent_outer;
            oidx       <= '0;
            for (int l = 0; l < LEVELS; l++) begin
              px[l]  <= ent_hx;
              py[l]  <= ent_hy;
              opx[l] <= cfg[ent % NSEQ].hx;
              opy[l] <= cfg[ent % NSEQ].hy;
            end
          end else begin
            busy <= 1'b0;
          end
        end
      end
    end
  end
endmodule
