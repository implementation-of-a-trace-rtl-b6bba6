// tb_te_workloads: the encoder configurations evaluated for the design, run on
// one benchmark-like program.
//
// Two encoders at the default buffer width take the same retirement blocks and
// the same APB writes: u_split with the default fill policy (packets split over
// the two buffers) and u_pad with zero padding. The program is the random one of
// te_tb_pkg with two thirds of its uninferable jumps turned into branches and
// rare traps, so that its control flow is closer to compiled code.
//   Part 1, padding against splitting in full and in delta address mode, resync
//     every 2^4 packets: both streams must decode to the retired instructions,
//     splitting must never need more link words than padding, and delta address
//     mode must need fewer bits than full address mode.
//   Part 2, the SyncMax sweep 2^4, 2^5, 2^6, 2^7, 2^8, 2^11, 2^14, 2^19 in delta
//     mode counting packets: every stream must decode, the number of resync
//     packets must stay within the interval, and the bit rate must not grow by
//     more than a rounding margin as the interval grows (resync packets move the
//     delta base, so the stream is not strictly smaller) and must end lower.
// Bits per instruction are reported for every configuration. The same program
// seed is used everywhere, so every run retires the same instructions.
module tb_te_workloads;
  import etrace_pkg::*;
  import te_tb_pkg::*;

  logic        clk = 0;
  logic        rst_n = 0;
  logic        psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0;
  logic [31:0] prdata[2];
  logic        pready[2], pslverr[2];
  hart_if_t    hart;
  logic        sink_valid[2];
  logic [511:0] sink_data[2];
  logic        pkt_valid[2], buf_padded[2];
  logic [LEN_W-1:0] pkt_len[2];

  // index 0: zero padding, index 1: split (the default)
  te_encoder #(.SPLIT(1'b0)) u_pad (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata(prdata[0]),
    .pready(pready[0]), .pslverr(pslverr[0]), .hart, .sink_valid(sink_valid[0]),
    .sink_data(sink_data[0]), .pkt_valid(pkt_valid[0]), .pkt_len(pkt_len[0]),
    .buf_padded(buf_padded[0])
  );
  te_encoder u_split (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata(prdata[1]),
    .pready(pready[1]), .pslverr(pslverr[1]), .hart, .sink_valid(sink_valid[1]),
    .sink_data(sink_data[1]), .pkt_valid(pkt_valid[1]), .pkt_len(pkt_len[1]),
    .buf_padded(buf_padded[1])
  );

  always #5 clk = ~clk;

  localparam int SEED   = 77;
  localparam int BLOCKS = 20000;

  int checks = 0, failures = 0;
  byte unsigned stream[2][$];

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

  task automatic apb_read(logic [11:0] a, output logic [31:0] d0, output logic [31:0] d1);
    @(posedge clk);
    psel <= 1; penable <= 0; pwrite <= 0; paddr <= a;
    @(posedge clk);
    penable <= 1;
    #1 d0 = prdata[0];
    d1 = prdata[1];
    @(posedge clk);
    psel <= 0; penable <= 0;
  endtask

  always @(posedge clk)
    for (int s = 0; s < 2; s++)
      if (sink_valid[s])
        for (int i = 0; i < 64; i++) stream[s].push_back(sink_data[s][8*i +: 8]);

  // one trace of the program in the given configuration; returns the words used
  // by each encoder and the resync count seen in the split stream
  task automatic run(bit full_addr, int syncmax, output int words[2], output int resyncs,
                     output int npk);
    logic [31:0] r0, r1, ctl;
    hart_if_t b;
    bit v;
    int errs, ndec, waitc;
    build_program(SEED, 1'b0);
    for (int i = 0; i < NPROG - 1; i++)
      if (p_kind[i] == K_UJ && (i % 3) != 0) begin
        p_kind[i] = K_BR; p_itype[i] = IT_TBRANCH;
      end
    exc_rate = 400;
    hart_reset(0);
    stream[0].delete();
    stream[1].delete();

    ctl = (32'd1 << 16) | (32'(syncmax) << 20);      // syncmode 1: count packets
    apb_write(12'h000, 32'h0);
    apb_write(12'h000, 32'h1);
    apb_write(12'h000, 32'h1 | ctl);
    apb_write(12'h008, {31'd0, full_addr});
    apb_write(12'h000, 32'h3 | ctl);
    apb_write(12'h000, 32'h7 | ctl);
    for (int n = 0; n < BLOCKS; n++) begin
      hart_step(b, v);
      @(negedge clk);
      hart <= v ? b : '0;
    end
    @(negedge clk);
    hart <= '0;
    apb_write(12'h000, 32'h3 | ctl);
    waitc = 0;
    do begin
      apb_read(12'h000, r0, r1);
      waitc++;
    end while (!(r0[3] && r1[3]) && waitc < 100);
    check(r0[3] && r1[3], "both encoders empty after tracing stops");
    repeat (4) @(posedge clk);

    for (int s = 0; s < 2; s++) begin
      byte unsigned bytes_s[$];
      bytes_s = stream[s];
      pkts.delete();
      void'(parse_bytes(bytes_s));
      errs = decode(full_addr, ndec);
      check(errs == 0 && ndec == golden.size(),
            $sformatf("%s, full_addr=%0d, SyncMax 2^%0d: trace rebuilt",
                      s ? "split" : "padding", full_addr, syncmax + 4));
      words[s] = stream[s].size() / 64;
    end
    resyncs = c_resync;
    npk     = pkts.size();
  endtask

  function automatic real bpi(int words);
    return real'(words * 512) / real'(golden.size());
  endfunction

  initial begin
    int w[2], rs, np;
    int words_full, words_delta;
    int sweep[8] = '{0, 1, 2, 3, 4, 7, 10, 15};
    int prev;
    hart = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // part 1: padding against splitting, full and delta address mode
    for (int f = 1; f >= 0; f--) begin
      run(f[0], 0, w, rs, np);
      $display("full_addr=%0d SyncMax 2^4: %0d instructions, padding %0d words (bpi %0.3f), split %0d words (bpi %0.3f)",
               f, golden.size(), w[0], bpi(w[0]), w[1], bpi(w[1]));
      check(w[1] <= w[0], "splitting needs no more words than padding");
      if (f == 1) words_full = w[1]; else words_delta = w[1];
    end
    check(words_delta < words_full, "delta address mode needs fewer bits than full address mode");

    // part 2: SyncMax sweep, delta mode, split
    prev = 0;
    for (int k = 0; k < 8; k++) begin
      run(1'b0, sweep[k], w, rs, np);
      $display("SyncMax 2^%0d: %0d packets, %0d resyncs, %0d words, bpi %0.3f",
               sweep[k] + 4, np, rs, w[1], bpi(w[1]));
      check(rs <= np / (1 << (sweep[k] + 4)) + 1,
            $sformatf("SyncMax 2^%0d: %0d resyncs in %0d packets", sweep[k] + 4, rs, np));
      if (k > 0)
        check(w[1] * 100 <= prev * 101 + 100,
              $sformatf("SyncMax 2^%0d: %0d words after %0d", sweep[k] + 4, w[1], prev));
      if (k == 0) words_delta = w[1];
      prev = w[1];
    end
    check(prev < words_delta, "the longest resync interval gives the lowest bit rate");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
