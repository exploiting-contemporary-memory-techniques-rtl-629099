// Burst controller for one memory module (one MDRAM command bus).
//
// Takes access requests from the SPM address streams of its module, each a run
// of len consecutive words along +x, and executes them as MDRAM bursts. A run
// is cut into sub-bursts that stop at the end of a 32-word segment (the
// boundary to the horizontally neighbouring bank) and are at most MAXBURST
// words long. Each sub-burst is one bank cycle, counted from its ACT:
//
//   read : ACT, RD, RD_LAT-1 wait cycles, n data cycles, PRE  = 5 + n cycles
//   write: ACT, WR, n data cycles, WR_REC recovery cycles, PRE = 4 + n cycles
//
// which reproduces the MDRAM burst times of 5+n (read) and 4+n (write) cycles
// used in the design's performance figures. Bank cycles of different banks
// overlap (bank interleaving): a new sub-burst is launched as soon as
//   - its bank is not busy with an earlier sub-burst,
//   - its ACT, its RD/WR (next cycle) and its PRE fall on free command-bus
//     cycles (one command per cycle),
//   - its data window starts after every data window already scheduled, so
//     the module's data bus is never shared, and
//   - its stream's read buffer has room for all n words, or its write buffer
//     holds all n words, counting words already committed to running bursts
//     (a burst cannot pause).
// So a row of consecutive segments, or rows in different banks, stream back
// to back: with RD_LAT = 3 the next read's ACT goes out while the previous
// read still moves data, and the data bus stays busy without gaps. Up to NTRK
// sub-bursts are in flight. The two streams are served round robin per
// sub-burst; stall is high while a stream waits only for buffer room or data.
// A refresh request (refresh_req) stops new launches; when all bursts are
// done one REF command is sent, followed by REF_CYC-1 quiet cycles, and
// refresh_ack pulses. Splitting at the 32-word limit, refresh handling and
// interleaved access to the banks of one module are the described duties of
// this unit; the command order, latencies, launch rules and buffer checks are
// this design's.
//
// Read data: rd_data is md_rdata passed straight through (no register in the
// path), and rd_push[s] is high in each data cycle with md_rdata, the word the
// MDRAM returns RD_LAT cycles after the RD command. Write data: the controller
// drives md_wdata from wr_head[s] in the n cycles after the WR command and
// pulses wr_pop[s] in each of them.
module burst_channel
  import mompda_pkg::*;
#(
  parameter int unsigned RD_LAT  = 3,   // RD command to first data word
  parameter int unsigned WR_REC  = 1,   // last write word to PRE
  parameter int unsigned REF_CYC = 4,   // cycles taken by a refresh
  parameter int unsigned NTRK    = 4,   // sub-bursts in flight
  parameter bit          MOD_ID  = 1'b0 // module this channel drives
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // requests of this module's streams
  input  logic      [SPM-1:0]   req_valid,
  output logic      [SPM-1:0]   req_ready,
  input  burst_req_t [SPM-1:0]  req,
  // buffer status and data of the smart memory interface
  input  logic [SPM-1:0][7:0]   rd_space,   // free words in each read buffer
  input  logic [SPM-1:0][7:0]   wr_count,   // words waiting in each write buffer
  input  word_t [SPM-1:0]       wr_head,
  output logic  [SPM-1:0]       rd_push,
  output word_t                 rd_data,
  output logic  [SPM-1:0]       wr_pop,
  // refresh
  input  logic                  refresh_req,
  output logic                  refresh_ack,
  // MDRAM command and data bus
  output mdram_cmd_t            md_cmd,
  output word_t                 md_wdata,
  input  word_t                 md_rdata,
  // status
  output logic                  idle,
  output logic                  stall,      // a pending sub-burst waits for a buffer
  output logic                  split       // a request was cut at a segment boundary
);
  localparam int unsigned AGEW  = 7;
  localparam int unsigned SSW   = (SPM > 1) ? $clog2(SPM) : 1;
  localparam int unsigned DS_RD = 1 + RD_LAT;   // ACT to first read word
  localparam int unsigned DS_WR = 2;            // ACT to first write word

  // sub-bursts in flight
  typedef struct packed {
    logic              valid;
    logic              we;
    logic [SSW-1:0]    stream;
    logic [BANKW-1:0]  bank;
    logic [PAGEW-1:0]  page;
    logic [COLW-1:0]   col;
    logic [BLW-1:0]    blen;
    logic [AGEW-1:0]   age;      // cycles since its ACT
    logic [AGEW-1:0]   ds;       // age of the first data word
    logic [AGEW-1:0]   pre;      // age of its PRE
  } trk_t;

  trk_t [NTRK-1:0]           trk;

  // one pending request per stream
  logic      [SPM-1:0]       pend;
  burst_req_t [SPM-1:0]      cur;      // x and len advance as sub-bursts launch
  logic [SPM-1:0][7:0]       committed; // buffer words promised to running bursts

  logic [SSW-1:0]            rr;       // round-robin pointer
  logic                      in_ref;   // refresh in progress
  logic [BLW-1:0]            ref_cnt;

  // next sub-burst of each pending request
  logic [SPM-1:0][BLW-1:0]   sub_len;
  logic [SPM-1:0]            buf_ok, time_ok, can_go;
  logic [SPM-1:0][AGEW-1:0]  sub_ds, sub_pre;
  logic [SPM-1:0]            am_mod;
  logic [SPM-1:0][BANKW-1:0] am_bank;
  logic [SPM-1:0][PAGEW-1:0] am_page;
  logic [SPM-1:0][COLW-1:0]  am_col;

  logic                      any_trk, trk_free;
  logic [$clog2(NTRK)-1:0]   free_slot;

  always_comb begin
    any_trk   = 1'b0;
    trk_free  = 1'b0;
    free_slot = '0;
    for (int j = NTRK - 1; j >= 0; j--) begin
      if (trk[j].valid) any_trk = 1'b1;
      else begin
        trk_free  = 1'b1;
        free_slot = j[$clog2(NTRK)-1:0];
      end
    end
  end

  for (genvar s = 0; s < SPM; s++) begin : g_s
    addr_map u_map (
      .x (cur[s].x), .y (cur[s].y),
      .module_sel (am_mod[s]), .bank (am_bank[s]), .page (am_page[s]), .col (am_col[s])
    );

    always_comb begin
      logic [BLW-1:0] to_seg;
      logic [8:0]     have;
      to_seg     = BLW'(MAXBURST) - BLW'(am_col[s]);
      sub_len[s] = (cur[s].len < LENW'(to_seg)) ? BLW'(cur[s].len) : to_seg;
      sub_ds[s]  = cur[s].we ? AGEW'(DS_WR) : AGEW'(DS_RD);
      sub_pre[s] = cur[s].we ? AGEW'(DS_WR + WR_REC) + AGEW'(sub_len[s])
                             : AGEW'(DS_RD) + AGEW'(sub_len[s]);
      have       = cur[s].we ? 9'(wr_count[s]) - 9'(committed[s])
                             : 9'(rd_space[s]) - 9'(committed[s]);
      buf_ok[s]  = pend[s] && !have[8] && (have[7:0] >= 8'(sub_len[s]));

      // timing rules against every sub-burst in flight
      time_ok[s] = trk_free && !refresh_req && !in_ref;
      for (int j = 0; j < NTRK; j++) begin
        if (trk[j].valid) begin
          // bank still busy
          if (trk[j].bank == am_bank[s]) time_ok[s] = 1'b0;
          // command slots: now (ACT), now+1 (RD/WR), now+pre (PRE)
          if (trk[j].age == AGEW'(1) || trk[j].age == trk[j].pre) time_ok[s] = 1'b0;
          if (trk[j].age + AGEW'(1) == trk[j].pre)                 time_ok[s] = 1'b0;
          if (trk[j].pre - trk[j].age == sub_pre[s])               time_ok[s] = 1'b0;
          // data windows in order
          if (sub_ds[s] + trk[j].age <= trk[j].ds + AGEW'(trk[j].blen) - AGEW'(1))
            time_ok[s] = 1'b0;
        end
      end
      can_go[s] = buf_ok[s] && time_ok[s];
    end

    assign req_ready[s] = !pend[s];
  end

  // round-robin choice among streams that can start now
  logic           launch;
  logic [SSW-1:0] pick;
  always_comb begin
    launch = 1'b0;
    pick   = rr;
    for (int k = 0; k < SPM; k++) begin
      logic [SSW-1:0] c;
      c = rr + k[SSW-1:0];
      if (!launch && can_go[c]) begin
        launch = 1'b1;
        pick   = c;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      trk         <= '0;
      pend        <= '0;
      cur         <= '0;
      committed   <= '0;
      rr          <= '0;
      in_ref      <= 1'b0;
      ref_cnt     <= '0;
      refresh_ack <= 1'b0;
      split       <= 1'b0;
    end else begin
      refresh_ack <= 1'b0;
      split       <= 1'b0;

      for (int s = 0; s < SPM; s++)
        if (req_valid[s] && !pend[s]) begin
          pend[s] <= 1'b1;
          cur[s]  <= req[s];
        end

      // age the bursts in flight; retire after their PRE
      for (int j = 0; j < NTRK; j++)
        if (trk[j].valid) begin
          trk[j].age <= trk[j].age + 1'b1;
          if (trk[j].age == trk[j].pre) trk[j].valid <= 1'b0;
        end

      // committed buffer words: + n at launch, - 1 per word moved
      for (int s = 0; s < SPM; s++) begin
        logic [7:0] c;
        c = committed[s];
        if (rd_push[s] || wr_pop[s]) c = c - 1'b1;
        if (launch && pick == SSW'(s)) c = c + 8'(sub_len[s]);
        committed[s] <= c;
      end

      if (launch) begin
        trk[free_slot] <= '{valid: 1'b1, we: cur[pick].we, stream: pick,
                            bank: am_bank[pick], page: am_page[pick], col: am_col[pick],
                            blen: sub_len[pick], age: AGEW'(1),
                            ds: sub_ds[pick], pre: sub_pre[pick]};
        rr <= pick + 1'b1;
        cur[pick].x   <= cur[pick].x + XW'(sub_len[pick]);
        cur[pick].len <= cur[pick].len - LENW'(sub_len[pick]);
        if (cur[pick].len == LENW'(sub_len[pick])) pend[pick] <= 1'b0;
        else                                        split      <= 1'b1;
      end

      // refresh once every burst has finished
      if (in_ref) begin
        ref_cnt <= ref_cnt - 1'b1;
        if (ref_cnt <= 1) begin
          in_ref      <= 1'b0;
          refresh_ack <= 1'b1;
        end
      end else if (refresh_req && !any_trk && !refresh_ack) begin
        in_ref  <= 1'b1;
        ref_cnt <= BLW'(REF_CYC);
      end
    end
  end

  // command bus, read and write data steering
  always_comb begin
    md_cmd      = '0;
    md_cmd.op   = MD_NOP;
    rd_push     = '0;
    wr_pop      = '0;
    rd_data     = md_rdata;
    md_wdata    = '0;
    if (launch) begin
      md_cmd.op   = MD_ACT;
      md_cmd.bank = am_bank[pick];
      md_cmd.page = am_page[pick];
    end
    if (in_ref && ref_cnt == BLW'(REF_CYC)) md_cmd.op = MD_REF;
    for (int j = 0; j < NTRK; j++) begin
      if (trk[j].valid) begin
        if (trk[j].age == AGEW'(1)) begin
          md_cmd.op   = trk[j].we ? MD_WR : MD_RD;
          md_cmd.bank = trk[j].bank;
          md_cmd.page = trk[j].page;
          md_cmd.col  = trk[j].col;
          md_cmd.blen = trk[j].blen;
        end
        if (trk[j].age == trk[j].pre) begin
          md_cmd.op   = MD_PRE;
          md_cmd.bank = trk[j].bank;
          md_cmd.page = trk[j].page;
        end
        if (trk[j].age >= trk[j].ds && trk[j].age < trk[j].ds + AGEW'(trk[j].blen)) begin
          if (trk[j].we) begin
            wr_pop[trk[j].stream] = 1'b1;
            md_wdata              = wr_head[trk[j].stream];
          end else begin
            rd_push[trk[j].stream] = 1'b1;
          end
        end
      end
    end
    if (!rst_n) md_cmd.op = MD_NOP;   // command bus quiet during reset
  end

  assign idle  = !any_trk && !in_ref && (pend == '0);
  assign stall = (pend != '0) && !launch && ((pend & ~buf_ok) != '0);

  // at most one command and one data word per cycle
  always_comb begin
    int ncmd, ndata;
    ncmd  = int'(launch) + int'(in_ref && ref_cnt == BLW'(REF_CYC));
    ndata = 0;
    for (int j = 0; j < NTRK; j++)
      if (trk[j].valid) begin
        ncmd += int'(trk[j].age == AGEW'(1)) + int'(trk[j].age == trk[j].pre);
        ndata += int'(trk[j].age >= trk[j].ds && trk[j].age < trk[j].ds + AGEW'(trk[j].blen));
      end
    if (rst_n) begin
      a_one_cmd:  assert (ncmd <= 1);
      a_one_word: assert (ndata <= 1);
    end
  end

  for (genvar s = 0; s < SPM; s++) begin : g_chk
    a_module: assert property (@(posedge clk) disable iff (!rst_n)
      pend[s] |-> (am_mod[s] == MOD_ID));
  end

  a_burst_len: assert property (@(posedge clk) disable iff (!rst_n)
    (md_cmd.op == MD_RD || md_cmd.op == MD_WR) |->
      (md_cmd.blen >= 1 && md_cmd.blen <= BLW'(MAXBURST) &&
       BLW'(md_cmd.col) + md_cmd.blen <= BLW'(MAXBURST)));
endmodule
