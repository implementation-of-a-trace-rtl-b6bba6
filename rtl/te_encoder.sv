// te_encoder: E-trace instruction branch-trace encoder for one RISC-V hart.
//
// Instead of reporting every retired instruction, the encoder reports only what
// a decoder that holds the program binary cannot infer: where tracing started,
// the taken/not-taken outcome of each conditional branch (one bit each), the
// targets of uninferable jumps, and traps. The packets are compressed by
// dropping redundant sign bytes, given a one-byte header, and packed into
// 512-bit words for a high-speed serial link.
//
// Two parts, as in the document's encoder:
//   te_cnt_reg     APB slave with trTeControl, trTeImpl, trTeInstFeatures
//   te_pkg_format  packet generation, compression and the dual 512-bit buffer
// Ports: APB3 slave (pready always high), the hart-to-encoder block interface
// (one block per cycle at most, no back-pressure), and the sink side: a one-cycle
// sink_valid strobe with the 512-bit word on sink_data. The packaging logic is
// held in reset while trTeActive is 0.
module te_encoder
  import etrace_pkg::*;
#(
  parameter int unsigned BUF_W = 512,
  parameter bit          SPLIT = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  // APB slave
  input  logic             psel,
  input  logic             penable,
  input  logic             pwrite,
  input  logic [11:0]      paddr,
  input  logic [31:0]      pwdata,
  output logic [31:0]      prdata,
  output logic             pready,
  output logic             pslverr,
  // hart-to-encoder interface
  input  hart_if_t         hart,
  // to the high-speed link
  output logic             sink_valid,
  output logic [BUF_W-1:0] sink_data,
  // packet stream observation
  output logic             pkt_valid,
  output logic [LEN_W-1:0] pkt_len,
  output logic             buf_padded
);

  te_cfg_t cfg;
  logic    enc_rst_n, te_empty;

  te_cnt_reg u_regs (
    .clk, .rst_n,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .te_empty,
    .enc_rst_n,
    .cfg
  );

  te_pkg_format #(.BUF_W(BUF_W), .SPLIT(SPLIT)) u_fmt (
    .clk,
    .rst_n (rst_n && enc_rst_n),
    .cfg, .hart,
    .sink_valid, .sink_data,
    .te_empty,
    .pkt_valid, .pkt_len, .buf_padded
  );

endmodule
