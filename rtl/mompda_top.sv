// MoM-PDA data memory subsystem: data sequencer, burst control unit and smart
// memory interface, with the command buses of the two parallel memory modules
// and the data ports of the reconfigurable ALU (rALU) brought out.
//
// The machine is driven by data, not by instructions: once the scan patterns
// are configured, start makes the data sequencer walk them, producing two
// address streams per memory module. The burst control unit turns each stream
// into MDRAM bursts on its module (rows alternate between the modules, bursts
// run along a row and are split at 32-word bank boundaries, bank cycles of
// different banks overlap, refresh is inserted between bursts). Read words collect in per-stream buffers of the
// smart memory interface, where the rALU takes them; results the rALU pushes
// into the write buffers are written back in bursts. A register file in the
// interface keeps reused words and intermediate results.
//
// The structure (sequencer, memory modules, smart interface, rALU) and the
// memory organisation follow the described machine. The rALU (a KressArray)
// and the MDRAM devices are outside this module: md_* connect to one MDRAM per
// module and ralu_* / cap_* / rf_* to the rALU.
//
// done is high while no operation runs; it falls the cycle after start and
// rises again when every stream has issued its last request and every burst,
// including the write-back of all buffered results, is finished. Status
// pulses (stall, split, refresh_done, seq_switch) are brought out for observation.
module mompda_top
  import mompda_pkg::*;
#(
  parameter int unsigned REFI       = 1040,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned NREGS      = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration and control
  input  scan_cfg_t [NSTREAMS-1:0][NSEQ-1:0] cfg,
  input  logic                          start,
  output logic                          done,
  // MDRAM modules
  output mdram_cmd_t [NMOD-1:0]         md_cmd,
  output word_t [NMOD-1:0]              md_wdata,
  input  word_t [NMOD-1:0]              md_rdata,
  // rALU: stream buffers
  output logic  [NSTREAMS-1:0]          ralu_rd_valid,
  output word_t [NSTREAMS-1:0]          ralu_rd_data,
  input  logic  [NSTREAMS-1:0]          ralu_rd_pop,
  output logic  [NSTREAMS-1:0]          ralu_wr_ready,
  input  logic  [NSTREAMS-1:0]          ralu_wr_push,
  input  word_t [NSTREAMS-1:0]          ralu_wr_data,
  // rALU: register file
  input  logic                          cap_en,
  input  logic [$clog2(NSTREAMS)-1:0]   cap_stream,
  input  logic [$clog2(NREGS)-1:0]      cap_reg,
  input  logic                          rf_we,
  input  logic [$clog2(NREGS)-1:0]      rf_waddr,
  input  word_t                         rf_wdata,
  input  logic [1:0][$clog2(NREGS)-1:0] rf_raddr,
  output word_t [1:0]                   rf_rdata,
  // status
  output logic [NMOD-1:0]               stall,
  output logic [NMOD-1:0]               split,
  output logic [NMOD-1:0]               refresh_done,
  output logic [NSTREAMS-1:0]           seq_switch
);
  logic       [NSTREAMS-1:0]      req_valid, req_ready;
  burst_req_t [NSTREAMS-1:0]      req;
  logic                           seq_done, bcu_idle;
  logic [NSTREAMS-1:0][7:0]       rd_space, wr_count;
  word_t [NSTREAMS-1:0]           wr_head;
  logic  [NSTREAMS-1:0]           rd_push, wr_pop;
  word_t [NMOD-1:0]               rd_data;
  logic                           running, start_d;

  data_sequencer u_seq (
    .clk, .rst_n, .start, .cfg,
    .req_valid, .req_ready, .req,
    .done (seq_done),
    .seq_switch
  );

  burst_control_unit #(.REFI (REFI)) u_bcu (
    .clk, .rst_n,
    .req_valid, .req_ready, .req,
    .rd_space, .wr_count, .wr_head,
    .rd_push, .rd_data, .wr_pop,
    .md_cmd, .md_wdata, .md_rdata,
    .idle (bcu_idle),
    .stall, .split, .refresh_done
  );

  smart_interface #(.FIFO_DEPTH (FIFO_DEPTH), .NREGS (NREGS)) u_smi (
    .clk, .rst_n,
    .mem_rd_push  (rd_push),
    .mem_rd_data  (rd_data),
    .mem_rd_space (rd_space),
    .mem_wr_count (wr_count),
    .mem_wr_head  (wr_head),
    .mem_wr_pop   (wr_pop),
    .ralu_rd_valid, .ralu_rd_data, .ralu_rd_pop,
    .ralu_wr_ready, .ralu_wr_push, .ralu_wr_data,
    .cap_en, .cap_stream, .cap_reg,
    .rf_we, .rf_waddr, .rf_wdata, .rf_raddr, .rf_rdata
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      start_d <= 1'b0;
    end else begin
      start_d <= start;
      if (start)                                            running <= 1'b1;
      else if (running && !start_d && seq_done && bcu_idle) running <= 1'b0;
    end
  end

  assign done = !running;
endmodule
