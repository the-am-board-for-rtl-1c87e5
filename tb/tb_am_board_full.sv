// tb_am_board_full -- one complete event through the AM++ board at full size.
//
// The board is built with its default sizes: four LAMBs of four chains of
// four chips, 4096 patterns per chip (262144 patterns). All patterns are
// loaded; forty of them hold live superstrips and the rest a value no hit
// uses. One event with ordered read-out (THR 6, then 5 after End-of-Hit) is
// run.
//
// The pattern banks are filled through the load port and mirrored in a
// table here. For each event the test sends the hits, builds its own
// reference bitmaps by comparing every hit with every stored pattern, and
// from them the expected roads of each criterion: the roads that pass the
// default threshold, then those that pass only the lowered one. Every road
// packet read from P3 is checked against that: right criterion (counted by
// the road_end pulses seen before it), right bitmap, no road twice, none
// missing. Each event must end with event_done_o. The P3 Space Available is
// random, so the road path is back-pressured. Just before End-of-Hit each
// event sends a burst of complete roads into a single chip while P3
// Space Available is held low, until 40 cycles after End-of-Hit.
//
// Mechanisms counted, each of which must happen at least once: roads leaving
// during the hit input phase, chains of one LAMB switching criterion at
// different times, a chain or LAMB stream held back because it is on a later
// criterion, P3 back-pressure, roads that passed through other chips of
// their chain, a full GLUE Opcode FIFO, a test-mode event and an unordered
// (default THR 7) event (these two only when the test runs more than one
// event). Last, in test mode, road packets written from VME into the TOP
// GLUE must come out on P3 unchanged and in order.
module tb_am_board_full;
  import am_pkg::*;

  localparam int unsigned C      = 4;     // chips per chain
  localparam int unsigned NP     = 4096;    // patterns per chip
  localparam int unsigned EVENTS = 1;
  localparam bit          SPARSE = 1; // few live patterns, rest never match
  localparam int unsigned PW     = $clog2(NP);
  localparam int unsigned LSW    = $clog2(N_CHAINS * C);
  localparam int unsigned NG     = N_LAMBS * N_CHAINS * C;
  localparam int unsigned NACT   = 40;
  localparam logic [SS_W-1:0] NEVER = '1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic p3_v, vme_v, tm, init, eoh, pat_we, r_sa;
  logic [LAYER_W-1:0] p3_l, vme_l;
  logic [SS_W-1:0] p3_s, vme_s;
  logic [3:0] thr0, thr1;
  logic [2+LSW-1:0] pat_chip;
  logic [PW-1:0] pat_addr;
  logic [N_LAYERS-1:0][SS_W-1:0] pat_ss;
  word_t r_data;
  logic r_da, r_end, ev_done;
  logic v_rwe = 0, v_rrdy, trd = 0;
  word_t v_road = '0;

  am_board dut (
    .clk(clk), .rst_n(rst_n),
    .p3_valid_i(p3_v), .p3_layer_i(p3_l), .p3_ss_i(p3_s),
    .init_i(init), .eoh_i(eoh), .cfg_thr_i(thr0), .cfg_req_i(2'b01), .cfg_thr_dec_i(thr1),
    .test_mode_i(tm), .vme_valid_i(vme_v), .vme_layer_i(vme_l), .vme_ss_i(vme_s),
    .pat_we_i(pat_we), .pat_chip_i(pat_chip), .pat_addr_i(pat_addr), .pat_ss_i(pat_ss),
    .road_data_o(r_data), .road_da_o(r_da), .road_sa_i(r_sa),
    .road_end_o(r_end), .event_done_o(ev_done),
    .test_road_i(trd), .vme_road_we_i(v_rwe), .vme_road_i(v_road), .vme_road_rdy_o(v_rrdy));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // Reference model state.
  logic [SS_W-1:0]     tpat [NG][NP][N_LAYERS];
  logic [N_LAYERS-1:0] bmref [NG][NP];
  int                  act_g [NACT], act_p [NACT];

  function automatic bit ref_pass(logic [N_LAYERS-1:0] bm, int thr);
    int n = 0;
    for (int l = 0; l < N_LAYERS; l++) if (bm[l]) n++;
    return bm[0] && n >= thr;      // XFT layer (0) required
  endfunction

  // ---------------------------------------------------- P3 road receiver
  word_t rx_a [$];
  word_t rx_b [$];
  int    rx_crit [$];
  int    n_end = 0;
  bit    second = 0;
  bit    in_input = 0;
  int    m_input_roads = 0, m_backpressure = 0, m_held = 0, m_fifo_full = 0;
  int    m_passthrough = 0, m_split = 0, m_testmode = 0, m_unordered = 0;
  int    m_test_roads = 0;
  int    n_done = 0;

  always @(posedge clk) begin
    if (!rst_n) second <= 0;
    else begin
      if (second) begin rx_b.push_back(r_data); second <= 0; end
      else if (r_da && r_sa) begin
        rx_a.push_back(r_data); rx_crit.push_back(n_end); second <= 1;
        if (in_input) m_input_roads++;
      end
      if (r_da && !r_sa) m_backpressure++;
      if (r_end) n_end++;
      if (ev_done) n_done++;
    end
  end
  bit hold_sa = 0;
  always @(negedge clk) r_sa <= !hold_sa && ($urandom_range(0, 3) != 0);

  // Probes of internal mechanisms.
  int dec_t [N_LAMBS][N_CHAINS];
  for (genvar b = 0; b < N_LAMBS; b++) begin : g_probe
    for (genvar c = 0; c < N_CHAINS; c++) begin : g_c
      always @(posedge clk) if (rst_n && dut.g_lamb[b].u_lamb.u_glue.chain_opc_o[c] == OP_DEC_THR)
        dec_t[b][c] = $time;
    end
    always @(posedge clk) if (rst_n) begin
      if (|(dut.g_lamb[b].u_lamb.u_glue.chain_da_i & ~dut.g_lamb[b].u_lamb.u_glue.allow)) m_held++;
      if (dut.g_lamb[b].u_lamb.u_glue.fifo_cnt == 2'd3) m_fifo_full++;
    end
  end
  always @(posedge clk) if (rst_n && |(dut.u_tg.lamb_da_i & ~dut.u_tg.allow)) m_held++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_hit(bit test, int l, int s);
    @(negedge clk);
    if (test) begin vme_v = 1; vme_l = LAYER_W'(l); vme_s = SS_W'(s); end
    else      begin p3_v  = 1; p3_l  = LAYER_W'(l); p3_s  = SS_W'(s); end
    for (int g = 0; g < NG; g++)
      for (int p = 0; p < NP; p++)
        if (tpat[g][p][l] == SS_W'(s)) bmref[g][p][l] = 1'b1;
    @(negedge clk);
    p3_v = 0; vme_v = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  task automatic pick(output int g, output int p);
    if (SPARSE) begin
      int k = $urandom_range(0, NACT - 1);
      g = act_g[k]; p = act_p[k];
    end else begin
      g = $urandom_range(0, NG - 1); p = $urandom_range(0, NP - 1);
    end
  endtask

  task automatic run_event(int ev, int t0, int t1, bit test);
    int nexp, g, p, base_end, ncrit [2];
    bit seen [NG][NP];
    thr0 = 4'(t0); thr1 = 4'(t1); tm = test;
    for (g = 0; g < NG; g++) for (p = 0; p < NP; p++) begin bmref[g][p] = '0; seen[g][p] = 0; end
    for (int b = 0; b < N_LAMBS; b++) for (int c = 0; c < N_CHAINS; c++) dec_t[b][c] = 0;
    rx_a.delete(); rx_b.delete(); rx_crit.delete();
    base_end = n_end;
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    repeat (6) @(negedge clk);
    in_input = 1;
    for (int r = 0; r < 12; r++) begin
      int kind = $urandom_range(0, 3);
      pick(g, p);
      for (int l = 0; l < N_LAYERS; l++) begin
        bit fire;
        case (kind)
          0: fire = 1;                                  // 6 of 6
          1: fire = (l != 1 + (r % 5));                 // 5 of 6 with XFT
          2: fire = (l != 0);                           // 5 of 6 without XFT
          default: fire = ($urandom_range(0, 1) == 1);
        endcase
        if (fire) send_hit(test, l, tpat[g][p][l]);
      end
      if (!SPARSE) send_hit(test, $urandom_range(0, N_LAYERS - 1), $urandom_range(0, 31));
    end
    // A burst of complete roads in one chip just before End-of-Hit keeps
    // that chain on the default criterion while the others move on.
    g = SPARSE ? act_g[0] : $urandom_range(0, NG - 1);
    hold_sa = 1;
    for (int r = 0; r < 6; r++) begin
      p = SPARSE ? act_p[r] : $urandom_range(0, NP - 1);
      for (int l = 0; l < N_LAYERS; l++) send_hit(test, l, tpat[g][p][l]);
    end
    @(negedge clk); eoh = 1;
    @(negedge clk); eoh = 0;
    in_input = 0;
    repeat (40) @(negedge clk);
    hold_sa = 0;
    begin
      int w = 0;
      while (n_done < ev && w < 20000) begin @(negedge clk); w++; end
      check(n_done == ev, $sformatf("event %0d: event_done", ev));
    end
    repeat (3) @(negedge clk);

    // Compare with the reference.
    nexp = 0; ncrit[0] = 0; ncrit[1] = 0;
    for (g = 0; g < NG; g++) for (p = 0; p < NP; p++)
      if (ref_pass(bmref[g][p], t1)) nexp++;
    check(rx_a.size() == nexp, $sformatf("event %0d: %0d roads, expected %0d", ev, rx_a.size(), nexp));
    for (int k = 0; k < rx_a.size(); k++) begin
      int want_crit;
      g = int'(rx_a[k] >> PW); p = int'(rx_a[k] & word_t'(NP - 1));
      check(g < NG && !seen[g][p], $sformatf("road %h unique and valid", rx_a[k]));
      if (g < NG) begin
        seen[g][p] = 1;
        want_crit = ref_pass(bmref[g][p], t0) ? 0 : 1;
        check(ref_pass(bmref[g][p], t1), $sformatf("road %h should not match", rx_a[k]));
        check(rx_b[k] == word_t'(bmref[g][p]), $sformatf("road %h bitmap %h expected %h", rx_a[k], rx_b[k], bmref[g][p]));
        check(rx_crit[k] - base_end == want_crit, $sformatf("road %h criterion %0d expected %0d", rx_a[k], rx_crit[k] - base_end, want_crit));
        if (want_crit < 2) ncrit[want_crit]++;
        if ((g % C) != C - 1) m_passthrough++;
      end
    end
    check(n_end - base_end == 2, $sformatf("event %0d: %0d road_end pulses", ev, n_end - base_end));
    for (int b = 0; b < N_LAMBS; b++) for (int c = 1; c < N_CHAINS; c++)
      if (dec_t[b][c] != dec_t[b][0]) m_split++;
    if (test && rx_a.size() > 0) m_testmode++;
    if (t0 == 7 && ncrit[0] == 0 && ncrit[1] > 0) m_unordered++;
    $display("event %0d: THR %0d->%0d test=%0d, %0d roads (%0d / %0d)", ev, t0, t1, test, rx_a.size(), ncrit[0], ncrit[1]);
  endtask

  initial begin
    p3_v = 0; vme_v = 0; tm = 0; init = 0; eoh = 0; pat_we = 0;
    p3_l = '0; p3_s = '0; vme_l = '0; vme_s = '0; thr0 = 6; thr1 = 5;
    pat_chip = '0; pat_addr = '0; pat_ss = '0;
    // Pattern contents.
    for (int g = 0; g < NG; g++) for (int p = 0; p < NP; p++) for (int l = 0; l < N_LAYERS; l++)
      tpat[g][p][l] = SPARSE ? NEVER : SS_W'($urandom_range(0, 31));
    if (SPARSE) for (int k = 0; k < NACT; k++) begin
      act_g[k] = (k < 8) ? 0 : (k * 7) % NG; act_p[k] = (k * 997 + 13) % NP;
      for (int l = 0; l < N_LAYERS; l++) tpat[act_g[k]][act_p[k]][l] = SS_W'(k * 8 + l);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < NG; g++) for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      pat_we = 1; pat_chip = (2+LSW)'(g); pat_addr = PW'(p);
      for (int l = 0; l < N_LAYERS; l++) pat_ss[l] = tpat[g][p][l];
    end
    @(negedge clk); pat_we = 0;
    repeat (5) @(negedge clk);

    for (int ev = 1; ev <= EVENTS; ev++) begin
      case (ev % 4)
        1: run_event(ev, 6, 5, 0);   // ordered read-out
        2: run_event(ev, 7, 5, 0);   // unordered read-out
        3: run_event(ev, 6, 5, 1);   // test-mode hits
        default: run_event(ev, 7, 5, 1);
      endcase
    end

    // Test mode, road side: VME packets through the TOP GLUE to P3.
    trd = 1;
    rx_a.delete(); rx_b.delete(); rx_crit.delete();
    for (int k = 0; k < 4; k++) begin
      for (int w = 0; w < 2; w++) begin
        while (!v_rrdy) @(negedge clk);
        v_rwe = 1; v_road = (w == 0) ? word_t'(18'h2A000 + k) : word_t'(k + 1);
        @(negedge clk); v_rwe = 0;
      end
    end
    begin
      automatic int w = 0;
      while (rx_b.size() < 4 && w < 1000) begin @(negedge clk); w++; end
    end
    repeat (20) @(negedge clk);
    trd = 0;
    check(rx_a.size() == 4 && rx_b.size() == 4, $sformatf("%0d VME road packets at P3, expected 4", rx_a.size()));
    for (int k = 0; k < 4 && k < rx_b.size(); k++) begin
      check(rx_a[k] == word_t'(18'h2A000 + k) && rx_b[k] == word_t'(k + 1),
            $sformatf("VME road packet %0d: %h %h", k, rx_a[k], rx_b[k]));
      m_test_roads++;
    end

    $display("mechanisms: input-phase roads %0d, split criteria %0d, held %0d, back-pressure %0d, pass-through %0d, opcode FIFO full %0d, test mode %0d, unordered %0d, VME roads %0d",
             m_input_roads, m_split, m_held, m_backpressure, m_passthrough, m_fifo_full, m_testmode, m_unordered, m_test_roads);
    check(m_input_roads > 0, "roads left during the input phase");
    check(m_split > 0, "chains changed criterion at different times");
    check(m_held > 0, "a later-criterion stream was held");
    check(m_backpressure > 0, "P3 back-pressure");
    check(m_passthrough > 0, "roads passed through other chips");
    check(m_fifo_full > 0, "GLUE Opcode FIFO full");
    check(m_test_roads > 0, "VME road packets sent through the TOP GLUE");
    if (EVENTS > 1) begin
      check(m_testmode > 0, "test-mode event");
      check(m_unordered > 0, "unordered event");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
