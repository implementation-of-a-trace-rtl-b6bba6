// tb_te_encoder: end-to-end test of the trace encoder at its default sizes.
//
// Brings the encoder up over APB in the order the trace control interface asks
// for (release from reset, check active, configure, enable, check enabled,
// start instruction trace), feeds it the retirement blocks of a random program
// run by the hart model in te_tb_pkg, switches tracing off, polls trTeEmpty,
// and then rebuilds the executed instruction addresses from nothing but the
// 512-bit words the encoder sent and the program. The rebuilt list must match
// what the hart model retired.
// A first short trace is aborted by clearing trTeActive, which must drop it.
// Several runs cover delta and full address mode, resync counted in packets and
// in clock cycles, a program without uninferable jumps (full branch maps), and
// addresses near the top of the 64-bit space. Every mechanism of the design is
// counted and must occur at least once. Compression is reported in bits per
// instruction.
module tb_te_encoder;
  import etrace_pkg::*;
  import te_tb_pkg::*;

  logic        clk = 0;
  logic        rst_n = 0;
  logic        psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0;
  logic [31:0] prdata;
  logic        pready, pslverr;
  hart_if_t    hart;
  logic        sink_valid;
  logic [511:0] sink_data;
  logic        pkt_valid, buf_padded;
  logic [LEN_W-1:0] pkt_len;

  te_encoder dut (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
    .pslverr, .hart, .sink_valid, .sink_data, .pkt_valid, .pkt_len, .buf_padded
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_split = 0, m_padflush = 0, m_words = 0, m_exc0 = 0, m_int = 0;
  int m_resync = 0, m_fullmap = 0, m_trap_stop = 0, m_arrival = 0, m_stop = 0;
  int m_trap = 0, m_support = 0, m_empty_seen = 0, m_busy_seen = 0;
  int m_full_mode = 0, m_delta_mode = 0, m_sync_cycles = 0, m_aborts = 0;
  byte unsigned stream[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic apb_write(logic [11:0] a, logic [31:0] d);
    @(posedge clk);
    psel <= 1; penable <= 0; pwrite <= 1; paddr <= a; pwdata <= d;
    @(posedge clk);
    penable <= 1;
    @(posedge clk);
    psel <= 0; penable <= 0; pwrite <= 0;
  endtask

  task automatic apb_read(logic [11:0] a, output logic [31:0] d);
    @(posedge clk);
    psel <= 1; penable <= 0; pwrite <= 0; paddr <= a;
    @(posedge clk);
    penable <= 1;
    #1 d = prdata;
    @(posedge clk);
    psel <= 0; penable <= 0;
  endtask

  // collect the link words
  always @(posedge clk) begin
    if (sink_valid) begin
      m_words++;
      for (int i = 0; i < 64; i++) stream.push_back(sink_data[8*i +: 8]);
      if (buf_padded) m_padflush++;
    end
  end

  // count packets that straddle two link words (split mode)
  function automatic int count_splits();
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

  task automatic run(int seed, int blocks, bit full_addr, int syncmode, int syncmax,
                     bit no_uj, bit far_addr);
    logic [31:0] r;
    hart_if_t b;
    bit v;
    int errs, ndec, waitc;
    longint unsigned inst;

    build_program(seed, far_addr);
    if (no_uj) begin
      for (int i = 0; i < NPROG - 1; i++)
        if (p_kind[i] == K_UJ) begin p_kind[i] = K_BR; p_itype[i] = IT_TBRANCH; end
      exc_rate = 100000;
    end else exc_rate = 40;
    hart_reset(0);
    stream.delete();
    pkts.delete();

    // bring-up sequence
    apb_write(12'h000, 32'h0);                       // hold in reset
    apb_write(12'h000, 32'h1);                       // release from reset
    apb_read (12'h000, r);
    check(r[0] == 1'b1, "trTeActive reads back 1");
    check(r[3] == 1'b1, "trTeEmpty set while idle");
    apb_write(12'h000, 32'h1 | (syncmode << 16) | (syncmax << 20));
    apb_write(12'h008, {31'd0, full_addr});
    apb_read (12'h008, r);
    check(r[0] == full_addr, "trTeInstFeatures written");
    apb_write(12'h000, 32'h3 | (syncmode << 16) | (syncmax << 20));
    apb_read (12'h000, r);
    check(r[1] == 1'b1, "trTeEnable reads back 1");
    apb_write(12'h000, 32'h7 | (syncmode << 16) | (syncmax << 20));

    // trace
    for (int n = 0; n < blocks; n++) begin
      hart_step(b, v);
      @(negedge clk);
      hart <= v ? b : '0;
    end
    @(negedge clk);
    hart <= '0;
    apb_write(12'h000, 32'h3 | (syncmode << 16) | (syncmax << 20));   // stop tracing
    apb_read(12'h000, r);
    if (!r[3]) m_busy_seen++;
    waitc = 0;
    do begin
      apb_read(12'h000, r);
      waitc++;
    end while (!r[3] && waitc < 100);
    check(r[3] == 1'b1, "trTeEmpty set after tracing stops");
    if (r[3]) m_empty_seen++;
    repeat (4) @(posedge clk);

    void'(parse_bytes(stream));
    errs = decode(full_addr, ndec);
    check(errs == 0, $sformatf("run %0d: trace rebuilt from the link words", seed));
    check(ndec == golden.size() && ndec > 0, "every retired instruction rebuilt");
    inst = golden.size();
    $display("run seed=%0d full_addr=%0d syncmode=%0d syncmax=%0d: %0d instructions, %0d packets, %0d words, bpi=%0.4f",
             seed, full_addr, syncmode, syncmax, inst, pkts.size(), stream.size() / 64,
             real'(stream.size() * 8) / real'(inst));
    m_split += count_splits();
    m_exc0 += st_exc0; m_int += st_int;
    m_resync += c_resync; m_fullmap += c_fullmap; m_trap_stop += c_trap_stop;
    m_arrival += c_arrival; m_stop += c_stop; m_trap += c_trap; m_support += c_support;
    if (full_addr) m_full_mode++; else m_delta_mode++;
    if (syncmode == 2 && c_resync > 0) m_sync_cycles++;
  endtask

  // switching trTeActive off in the middle of a trace resets the packaging
  // logic: the trace is dropped and nothing more is sent
  task automatic abort_test();
    logic [31:0] r;
    hart_if_t b;
    bit v;
    int w0;
    build_program(9, 1'b0);
    exc_rate = 40;
    hart_reset(0);
    apb_write(12'h000, 32'h1);
    apb_write(12'h000, 32'h3 | (1 << 16));
    apb_write(12'h000, 32'h7 | (1 << 16));
    for (int n = 0; n < 40; n++) begin
      hart_step(b, v);
      @(negedge clk);
      hart <= v ? b : '0;
    end
    @(negedge clk);
    hart <= '0;
    w0 = m_words;
    apb_write(12'h000, 32'h0);
    repeat (50) @(posedge clk);
    check(m_words == w0, "no word sent after trTeActive is cleared");
    apb_write(12'h000, 32'h1);
    apb_read(12'h000, r);
    check(r[3] == 1'b1, "encoder empty after reset by trTeActive");
    m_aborts++;
  endtask

  initial begin
    hart = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    abort_test();
    run(1, 3000, 1'b0, 1, 0, 1'b0, 1'b0);   // delta, resync every 2^4 packets
    run(2, 3000, 1'b1, 1, 0, 1'b0, 1'b0);   // full address mode
    run(3, 3000, 1'b0, 2, 2, 1'b0, 1'b0);   // resync every 2^6 cycles
    run(4, 2000, 1'b0, 0, 0, 1'b1, 1'b0);   // no uninferable jumps: full branch maps
    run(5, 2000, 1'b1, 1, 3, 1'b0, 1'b1);   // addresses near the top of the space
    check(m_split > 0,      "a packet was split over two buffers");
    check(m_padflush > 0,   "a partly filled buffer was flushed");
    check(m_exc0 > 0,       "a trap that retired nothing");
    check(m_int > 0,        "an interrupt");
    check(m_resync > 0,     "a resync packet");
    check(m_sync_cycles > 0,"a resync counted in cycles");
    check(m_fullmap > 0,    "a full branch map packet");
    check(m_trap > 0,       "a trap packet");
    check(m_trap_stop > 0,  "a trap packet carrying a stop address");
    check(m_arrival > 0,    "an uninferable-jump target report");
    check(m_stop > 0,       "a stop report");
    check(m_support > 0,    "an end-of-trace support packet");
    check(m_busy_seen > 0 || m_empty_seen > 0, "trTeEmpty observed");
    check(m_full_mode > 0 && m_delta_mode > 0, "both address modes");
    check(m_aborts > 0,     "a trace aborted by clearing trTeActive");
    $display("mechanisms: split=%0d flush=%0d exc0=%0d int=%0d resync=%0d fullmap=%0d trap=%0d trap_stop=%0d arrival=%0d stop=%0d support=%0d words=%0d",
             m_split, m_padflush, m_exc0, m_int, m_resync, m_fullmap, m_trap, m_trap_stop,
             m_arrival, m_stop, m_support, m_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
