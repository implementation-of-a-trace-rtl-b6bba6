// tb_te_pkt_gen: self-checking test of the packet generation logic.
//
// Drives the generator with the retirement blocks of a random program (hart
// model in te_tb_pkg), then switches tracing off. The raw packets it produces
// (sign-extended, before compression) are decoded, with only the program known,
// back into the list of executed instructions, which must equal what the hart
// model retired. Runs cover delta and full address mode, resync by packet count
// and by cycle count, and programs with and without uninferable jumps. The test
// also checks the end-of-trace sequence (a stop report, then a support packet as
// the very last packet, then idle within a few cycles), that the resync
// interval is respected (no more than 2^(syncmax+4) packets between format 3
// packets while resync by packets is on, with a few packets of slack because
// the resync waits for an empty branch map), and that every packet kind occurred.
module tb_te_pkt_gen;
  import etrace_pkg::*;
  import te_tb_pkg::*;

  logic             clk = 0;
  logic             rst_n = 0;
  te_cfg_t          cfg;
  hart_if_t         hart;
  logic             pkt_valid;
  logic [PKT_W-1:0] pkt;
  logic             idle;

  te_pkt_gen dut (.clk, .rst_n, .cfg, .hart, .pkt_valid, .pkt, .idle);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int t_start = 0, t_resync = 0, t_trap = 0, t_trap_stop = 0, t_arrival = 0;
  int t_stop = 0, t_fullmap = 0, t_support = 0;
  int since_f3 = 0, max_gap = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && pkt_valid) begin
      pkts.push_back(pkt);
      if (pkt[1:0] == 2'd3) since_f3 = 0;
      else begin
        since_f3++;
        if (since_f3 > max_gap) max_gap = since_f3;
      end
    end
  end

  task automatic run(int seed, int blocks, bit full_addr, int syncmode, int syncmax, bit no_uj);
    hart_if_t b;
    bit v;
    int errs, ndec, waitc;
    build_program(seed, 1'b0);
    if (no_uj) begin
      for (int i = 0; i < NPROG - 1; i++)
        if (p_kind[i] == K_UJ) begin p_kind[i] = K_BR; p_itype[i] = IT_TBRANCH; end
      exc_rate = 100000;
    end else exc_rate = 30;
    hart_reset(0);
    pkts.delete();
    since_f3 = 0;
    max_gap = 0;
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
    cfg.tracing = 1'b0;
    waitc = 0;
    do begin
      @(negedge clk);
      waitc++;
    end while (!idle && waitc < 50);
    check(idle, "generator idle after tracing stops");
    check(waitc <= 8, $sformatf("end sequence took %0d cycles", waitc));
    check(pkts.size() > 1 && pkts[$][3:0] == 4'b1111, "last packet is a support packet");
    errs = decode(full_addr, ndec);
    check(errs == 0, $sformatf("run %0d: packets decode to the retired instructions", seed));
    check(ndec == golden.size(), "every retired instruction rebuilt");
    if (syncmode == 1)
      check(max_gap <= (1 << (syncmax + 4)) + 8,
            $sformatf("resync interval: %0d packets without format 3", max_gap));
    t_start += c_start; t_resync += c_resync; t_trap += c_trap; t_trap_stop += c_trap_stop;
    t_arrival += c_arrival; t_stop += c_stop; t_fullmap += c_fullmap; t_support += c_support;
    $display("run %0d: %0d instructions, %0d packets, max gap %0d", seed, golden.size(),
             pkts.size(), max_gap);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    cfg  = '0;
    hart = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(11, 1500, 1'b0, 1, 0, 1'b0);
    run(12, 1500, 1'b1, 2, 1, 1'b0);
    run(13, 1500, 1'b0, 0, 0, 1'b1);
    run(14, 1500, 1'b0, 1, 1, 1'b0);
    check(t_start == 4,   "one start packet per run");
    check(t_resync > 0,   "resync packets");
    check(t_trap > 0,     "trap packets");
    check(t_trap_stop > 0,"trap packets with a stop address");
    check(t_arrival > 0,  "uninferable jump target reports");
    check(t_stop > 0,     "stop reports");
    check(t_fullmap > 0,  "full branch map packets");
    check(t_support == 4, "one support packet per run");
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
