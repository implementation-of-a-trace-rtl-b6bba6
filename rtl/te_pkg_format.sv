// te_pkg_format: the encoder's packaging component.
//
// Chains the three stages that turn hart retirement blocks into link-sized
// words:
//   te_pkt_gen   next/current/previous pipeline and packet generation logic
//   te_compress  sign-based compression and one-byte header
//   te_buffer    two alternating 512-bit buffers towards the high-speed link
// When tracing has been switched off and the last packets have left the
// generator and the compressor, the partly filled buffer is flushed.
// te_empty (read back as trTeEmpty) is set when no trace data is held anywhere.
// Timing: a packet reaches the buffer two cycles after its block leaves the
// "current" stage; sink_valid follows one cycle later. The split of the
// component into these stages follows the document.
module te_pkg_format
  import etrace_pkg::*;
#(
  parameter int unsigned BUF_W = 512,
  parameter bit          SPLIT = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,        // synchronous, active low
  input  te_cfg_t          cfg,
  input  hart_if_t         hart,
  output logic             sink_valid,
  output logic [BUF_W-1:0] sink_data,
  output logic             te_empty,
  // observation of the packet stream (for statistics)
  output logic             pkt_valid,
  output logic [LEN_W-1:0] pkt_len,
  output logic             buf_padded
);

  logic             gen_valid, gen_idle;
  logic [PKT_W-1:0] gen_pkt;
  logic             cmp_valid;
  logic [LEN_W-1:0] cmp_len;
  logic [OUT_W-1:0] cmp_data;
  logic             buf_empty;

  te_pkt_gen u_gen (
    .clk, .rst_n, .cfg, .hart,
    .pkt_valid (gen_valid),
    .pkt       (gen_pkt),
    .idle      (gen_idle)
  );

  te_compress u_cmp (
    .clk, .rst_n,
    .in_valid  (gen_valid),
    .in_pkt    (gen_pkt),
    .out_valid (cmp_valid),
    .out_len   (cmp_len),
    .out_data  (cmp_data)
  );

  wire flush = gen_idle && !cmp_valid;

  te_buffer #(.BUF_W(BUF_W), .SPLIT(SPLIT)) u_buf (
    .clk, .rst_n,
    .in_valid   (cmp_valid),
    .in_len     (cmp_len),
    .in_data    (cmp_data),
    .flush      (flush),
    .sink_valid (sink_valid),
    .sink_data  (sink_data),
    .empty      (buf_empty),
    .padded     (buf_padded)
  );

  assign te_empty  = gen_idle && !cmp_valid && buf_empty;
  assign pkt_valid = cmp_valid;
  assign pkt_len   = cmp_len;

endmodule
