// Data sequencer: NSTREAMS independent address streams, two per memory module.
//
// Each stream is a scan_gen running its own list of up to NSEQ scan patterns,
// concatenated or nested in pairs (seq_switch[s] pulses whenever a pattern
// starts after the stream's first one); stream s serves
// module s / SPM. All enabled streams start together on start and done rises
// when the last one has issued its final request. A stream only issues
// addresses of rows belonging to its module (y mod NMOD = module); the data
// arrangement is expected to guarantee this, and an assertion checks it.
// That the sequencer drives two independent address streams per module comes
// from the described machine; the common start/done handshake is this design's.
module data_sequencer
  import mompda_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  scan_cfg_t [NSTREAMS-1:0][NSEQ-1:0] cfg,
  output logic      [NSTREAMS-1:0]  req_valid,
  input  logic      [NSTREAMS-1:0]  req_ready,
  output burst_req_t [NSTREAMS-1:0] req,
  output logic                      done,
  output logic      [NSTREAMS-1:0]  seq_switch
);
  logic [NSTREAMS-1:0] busy;

  for (genvar s = 0; s < NSTREAMS; s++) begin : g_stream
    scan_gen u_gen (
      .clk, .rst_n, .start,
      .cfg       (cfg[s]),
      .req_valid (req_valid[s]),
      .req_ready (req_ready[s]),
      .req       (req[s]),
      .busy      (busy[s]),
      .seq_switch (seq_switch[s])
    );

    a_module_rows: assert property (@(posedge clk) disable iff (!rst_n)
      req_valid[s] |-> (req[s].y[0] == 1'(s / SPM)));
  end

  assign done = ~|busy;
endmodule
