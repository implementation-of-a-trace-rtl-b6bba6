// tb_te_pkg_format: self-checking test of the packaging component.
//
// The component is built with zero padding (SPLIT = 0), the fill policy the
// end-to-end test of the encoder does not use, and driven with the retirement
// blocks of a random program and a configuration set directly (no registers).
// Every 512-bit word it sends is appended to a byte stream, and the stream is
// parsed back into packets (zero bytes where a header is expected are padding)
// and decoded into the executed instruction list, which must equal what the
// hart model retired. Further checks: no packet crosses a word boundary, the
// number and total length of packets seen on the observation port match the
// stream, te_empty is clear while trace data is held and set within a few cycles
// after tracing stops, and padding happened.
module tb_te_pkg_format;
  import etrace_pkg::*;
  import te_tb_pkg::*;

  localparam int BUF_W = 512;

  logic             clk = 0;
  logic             rst_n = 0;
  te_cfg_t          cfg;
  hart_if_t         hart;
  logic             sink_valid, te_empty, pkt_valid, buf_padded;
  logic [BUF_W-1:0] sink_data;
  logic [LEN_W-1:0] pkt_len;

  te_pkg_format #(.BUF_W(BUF_W), .SPLIT(1'b0)) dut (
    .clk, .rst_n, .cfg, .hart, .sink_valid, .sink_data, .te_empty, .pkt_valid, .pkt_len,
    .buf_padded
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pkt = 0, n_bytes = 0, n_padded = 0, n_busy = 0;
  byte unsigned stream[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (sink_valid) begin
        for (int i = 0; i < BUF_W / 8; i++) stream.push_back(sink_data[8*i +: 8]);
        if (buf_padded) n_padded++;
      end
      if (pkt_valid) begin
        n_pkt++;
        n_bytes += int'(pkt_len);
      end
      if (!te_empty) n_busy++;
    end
  end

  // packets never straddle two words with zero padding
  function automatic int crossings();
    int pos, len, n;
    pos = 0; n = 0;
    while (pos < stream.size()) begin
      len = stream[pos] & 8'h1F;
      if (len == 0) begin pos++; continue; end
      if ((pos / 64) != ((pos + len) / 64)) n++;
      pos += len + 1;
    end
    return n;
  endfunction

  task automatic run(int seed, int blocks, bit full_addr, int syncmode, int syncmax);
    hart_if_t b;
    bit v;
    int errs, ndec, waitc, npk;
    build_program(seed, 1'b0);
    exc_rate = 40;
    hart_reset(0);
    pkts.delete();
    stream.delete();
    n_pkt = 0; n_bytes = 0;
    @(negedge clk);
    cfg.full_addr = full_addr;
    cfg.syncmode  = syncmode_e'(syncmode);
    cfg.syncmax   = 4'(syncmax);
    cfg.tracing   = 1'b1;
    for (int n = 0; n < blocks; n++) begin
      hart_step(b, v);
      hart = v ? b : '0;
      @(negedge clk);
    end
    hart = '0;
    check(!te_empty, "te_empty clear while trace data is held");
    cfg.tracing = 1'b0;
    waitc = 0;
    do begin
      @(negedge clk);
      waitc++;
    end while (!te_empty && waitc < 50);
    check(te_empty, "te_empty set after tracing stops");
    check(waitc <= 10, $sformatf("drained in %0d cycles", waitc));
    repeat (2) @(negedge clk);
    npk = parse_bytes(stream);
    check(npk == n_pkt, $sformatf("%0d packets in the stream, %0d sent", npk, n_pkt));
    check(crossings() == 0, "no packet crosses a word boundary");
    errs = decode(full_addr, ndec);
    check(errs == 0, $sformatf("run %0d: stream decodes to the retired instructions", seed));
    check(ndec == golden.size(), "every retired instruction rebuilt");
    $display("run %0d: %0d instructions, %0d packets, %0d bytes, %0d words", seed,
             golden.size(), n_pkt, n_bytes, stream.size() / 64);
  endtask

  initial begin
    cfg  = '0;
    hart = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(21, 2000, 1'b0, 1, 1);
    run(22, 2000, 1'b1, 2, 3);
    check(n_padded > 0, "words closed with zero padding");
    check(n_busy > 0, "te_empty observed clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
