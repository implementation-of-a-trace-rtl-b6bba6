// te_cnt_reg: trace encoder control registers behind an APB slave port.
//
// Three 32-bit registers, at the offsets of the RISC-V trace control interface:
//   0x000 trTeControl       [0] trTeActive, [1] trTeEnable, [2] trTeInstTracing,
//                           [3] trTeEmpty (read only, from the packaging logic),
//                           [6:4] trTeInstMode (reads 3: branch trace),
//                           [17:16] trTeInstSyncMode, [23:20] trTeInstSyncMax,
//                           [26:24] trTeFormat (reads 0: E-trace)
//   0x004 trTeImpl          read only: [3:0] version major = 1, [7:4] minor = 0,
//                           [11:8] component type = 0 (encoder)
//   0x008 trTeInstFeatures  [0] trTeInstNoAddrDiff (1 = full address mode)
// Other offsets read as zero and ignore writes.
//
// Bring-up follows the trace control interface: writing trTeActive=1 releases
// the encoder from reset (while trTeActive is 0 all other writable fields are
// held at their reset value and enc_rst_n is low), then the sync and feature
// fields are written, then trTeEnable, then trTeInstTracing. Tracing runs while
// all three of trTeActive, trTeEnable and trTeInstTracing are set.
//
// APB timing: every access completes in its access phase (pready is tied high),
// two clock cycles per transfer. Writes take effect at the end of the access
// phase; read data is driven combinationally during the access phase.
// The register set, the read-only trTeImpl and the trTeEmpty status follow the
// document; the bit positions follow the trace control interface standard and the
// version numbers are this design's choice.
module te_cnt_reg
  import etrace_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,      // synchronous, active low
  // APB slave
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [11:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  // to / from the packaging logic
  input  logic        te_empty,
  output logic        enc_rst_n,   // synchronous reset of the packaging logic
  output te_cfg_t     cfg
);

  localparam logic [11:0] A_CONTROL  = 12'h000;
  localparam logic [11:0] A_IMPL     = 12'h004;
  localparam logic [11:0] A_FEATURES = 12'h008;

  localparam logic [31:0] IMPL_VALUE = 32'h0000_0001;   // v1.0, encoder

  logic       active_q, enable_q, tracing_q, noaddrdiff_q;
  logic [1:0] syncmode_q;
  logic [3:0] syncmax_q;

  wire wr = psel && penable && pwrite;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_q     <= 1'b0;
      enable_q     <= 1'b0;
      tracing_q    <= 1'b0;
      noaddrdiff_q <= 1'b0;
      syncmode_q   <= 2'd0;
      syncmax_q    <= 4'd0;
    end else if (wr && paddr == A_CONTROL) begin
      active_q <= pwdata[0];
      if (active_q && pwdata[0]) begin
        enable_q   <= pwdata[1];
        tracing_q  <= pwdata[2] & pwdata[1];
        syncmode_q <= pwdata[17:16];
        syncmax_q  <= pwdata[23:20];
      end else begin
        // entering or staying in reset: everything else returns to reset values
        enable_q     <= 1'b0;
        tracing_q    <= 1'b0;
        syncmode_q   <= 2'd0;
        syncmax_q    <= 4'd0;
        noaddrdiff_q <= 1'b0;
      end
    end else if (wr && paddr == A_FEATURES && active_q) begin
      noaddrdiff_q <= pwdata[0];
    end
  end

  logic [31:0] control_rd;
  always_comb begin
    control_rd        = '0;
    control_rd[0]     = active_q;
    control_rd[1]     = enable_q;
    control_rd[2]     = tracing_q;
    control_rd[3]     = te_empty;
    control_rd[6:4]   = 3'd3;
    control_rd[17:16] = syncmode_q;
    control_rd[23:20] = syncmax_q;
    control_rd[26:24] = 3'd0;
  end

  always_comb begin
    unique case (paddr)
      A_CONTROL:  prdata = control_rd;
      A_IMPL:     prdata = IMPL_VALUE;
      A_FEATURES: prdata = {31'd0, noaddrdiff_q};
      default:    prdata = '0;
    endcase
  end

  assign pready  = 1'b1;
  assign pslverr = 1'b0;

  assign enc_rst_n     = active_q;
  assign cfg.tracing   = active_q & enable_q & tracing_q;
  assign cfg.full_addr = noaddrdiff_q;
  assign cfg.syncmode  = syncmode_e'(syncmode_q);
  assign cfg.syncmax   = syncmax_q;

  // APB rule: with pready tied high, every access phase follows a setup phase
  property p_setup_first;
    @(posedge clk) disable iff (!rst_n) (psel && penable) |-> $past(psel && !penable);
  endproperty
  a_setup_first: assert property (p_setup_first);

endmodule
