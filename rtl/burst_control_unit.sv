// Burst control unit: the two address streams of each memory module enter here
// and leave as MDRAM command sequences, one burst_channel per module, so both
// modules work in parallel on their own buses. Within a module, bank cycles of
// different banks overlap, up to NTRK sub-bursts at a time (see burst_channel).
//
// A shared refresh timer raises a refresh request every REFI cycles; each
// channel stops launching bursts, sends REF once the bursts in flight are done,
// and the request stays pending per channel until acknowledged. Refresh
// handling and burst splitting are the unit's described tasks; the refresh
// interval (REFI = 1040 cycles, about 15.6 us at the 15 ns cycle) and refresh
// duration are this design's values.
//
// Stream s of the request arrays belongs to module s / SPM. Read data of a
// module leave on rd_data[m] with rd_push[s] marking the stream; rd_data[m] is
// the module's read bus passed through unregistered. Write data are taken from
// wr_head[s] with wr_pop[s].
module burst_control_unit
  import mompda_pkg::*;
#(
  parameter int unsigned REFI    = 1040,
  parameter int unsigned REF_CYC = 4,
  parameter int unsigned RD_LAT  = 3,
  parameter int unsigned WR_REC  = 1,
  parameter int unsigned NTRK    = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic       [NSTREAMS-1:0]   req_valid,
  output logic       [NSTREAMS-1:0]   req_ready,
  input  burst_req_t [NSTREAMS-1:0]   req,
  input  logic [NSTREAMS-1:0][7:0]    rd_space,
  input  logic [NSTREAMS-1:0][7:0]    wr_count,
  input  word_t [NSTREAMS-1:0]        wr_head,
  output logic  [NSTREAMS-1:0]        rd_push,
  output word_t [NMOD-1:0]            rd_data,
  output logic  [NSTREAMS-1:0]        wr_pop,
  output mdram_cmd_t [NMOD-1:0]       md_cmd,
  output word_t [NMOD-1:0]            md_wdata,
  input  word_t [NMOD-1:0]            md_rdata,
  output logic                        idle,
  output logic [NMOD-1:0]             stall,
  output logic [NMOD-1:0]             split,
  output logic [NMOD-1:0]             refresh_done
);
  logic [$clog2(REFI+1)-1:0] ref_timer;
  logic [NMOD-1:0]           ref_pend;
  logic [NMOD-1:0]           ref_ack;
  logic [NMOD-1:0]           ch_idle;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ref_timer <= '0;
      ref_pend  <= '0;
    end else begin
      if (ref_timer == $bits(ref_timer)'(REFI - 1)) ref_timer <= '0;
      else                                          ref_timer <= ref_timer + 1'b1;
      for (int m = 0; m < NMOD; m++) begin
        if (ref_timer == $bits(ref_timer)'(REFI - 1)) ref_pend[m] <= 1'b1;
        else if (ref_ack[m])                          ref_pend[m] <= 1'b0;
      end
    end
  end

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    burst_channel #(
      .RD_LAT (RD_LAT), .WR_REC (WR_REC), .REF_CYC (REF_CYC), .NTRK (NTRK), .MOD_ID (1'(m))
    ) u_ch (
      .clk, .rst_n,
      .req_valid   (req_valid[m*SPM +: SPM]),
      .req_ready   (req_ready[m*SPM +: SPM]),
      .req         (req[m*SPM +: SPM]),
      .rd_space    (rd_space[m*SPM +: SPM]),
      .wr_count    (wr_count[m*SPM +: SPM]),
      .wr_head     (wr_head[m*SPM +: SPM]),
      .rd_push     (rd_push[m*SPM +: SPM]),
      .rd_data     (rd_data[m]),
      .wr_pop      (wr_pop[m*SPM +: SPM]),
      .refresh_req (ref_pend[m]),
      .refresh_ack (ref_ack[m]),
      .md_cmd      (md_cmd[m]),
      .md_wdata    (md_wdata[m]),
      .md_rdata    (md_rdata[m]),
      .idle        (ch_idle[m]),
      .stall       (stall[m]),
      .split       (split[m])
    );
  end

  assign idle         = &ch_idle;
  assign refresh_done = ref_ack;
endmodule
