// tb_top_glue -- self-checking test of the TOP GLUE.
//
// Four behavioural LAMB models watch the OPCODE broadcast. After OP_INIT a
// LAMB offers 2l roads of the default criterion; once it has seen the DATA
// word of OP_DEC_THR and sent those roads it pulses Road_end and offers two
// roads of the lowered criterion, then pulses Road_end again. LAMB 0 has no
// default roads, so its second-criterion roads are ready early and must be
// held. Checks: the OPCODE words (OP_INIT; OP_DEC_THR and the DATA word on
// the next cycle); every packet whole and once; no second-criterion road
// before the first road_end_o; two road_end_o pulses; event_done_o once,
// with the second. The P3 Space Available is random. Then, in test mode,
// packets written from VME must reach P3 whole and in order while a road
// offered by LAMB 0 is held; it must pass once test mode ends.
module tb_top_glue;
  import am_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init, eoh;
  logic [OPC_W-1:0] opc;
  word_t [N_LAMBS-1:0] l_data;
  logic  [N_LAMBS-1:0] l_da, l_sa, l_end;
  word_t r_data;
  logic r_da, r_sa, r_end, ev_done;
  logic tmode = 0, v_we = 0, v_rdy;
  word_t v_road = '0;

  top_glue dut (
    .clk(clk), .rst_n(rst_n), .init_i(init), .eoh_i(eoh), .cfg_thr_dec_i(4'd5),
    .opc_o(opc), .lamb_data_i(l_data), .lamb_da_i(l_da), .lamb_sa_o(l_sa),
    .lamb_end_i(l_end), .road_data_o(r_data), .road_da_o(r_da), .road_sa_i(r_sa),
    .road_end_o(r_end), .event_done_o(ev_done),
    .test_road_i(tmode), .vme_road_we_i(v_we), .vme_road_i(v_road), .vme_road_rdy_o(v_rdy));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_t mk(int crit, int l, int i);
    return word_t'((crit << 16) | (l << 12) | i);
  endfunction
  function automatic word_t bm_of(word_t a);
    return a ^ 18'h0AAAA;
  endfunction

  // ------------------------------------------------------- LAMB models
  word_t q [N_LAMBS][$];
  int    st [N_LAMBS];
  int    phase [N_LAMBS];     // 0 idle, 1 default, 2 waiting end, 3 lowered
  bit    dec_seen;
  logic [OPC_W-1:0] opc_prev;
  logic [OPC_W-1:0] opc_log [$];
  int cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    opc_prev <= opc;
    if (rst_n && (opc != OP_NOP || opc_prev == OP_DEC_THR)) opc_log.push_back(opc);
    if (rst_n && opc_prev == OP_DEC_THR) dec_seen = 1;
    for (int l = 0; l < N_LAMBS; l++) begin
      l_end[l] <= 0;
      if (!rst_n) begin
        st[l] = 0; phase[l] = 0; l_da[l] <= 0; l_data[l] <= '0;
      end else begin
        if (opc == OP_INIT) begin
          phase[l] = 1;
          for (int i = 0; i < 2 * l; i++) q[l].push_back(mk(0, l, i));
        end
        if (phase[l] == 1 && dec_seen && q[l].size() == 0 && st[l] == 0) begin
          l_end[l] <= 1; phase[l] = 3;
          for (int i = 0; i < 2; i++) q[l].push_back(mk(1, l, i));
        end else if (phase[l] == 3 && q[l].size() == 0 && st[l] == 0) begin
          l_end[l] <= 1; phase[l] = 4;
        end
        case (st[l])
          0: if (q[l].size() > 0) begin l_data[l] <= q[l][0]; l_da[l] <= 1; st[l] = 1; end
          1: if (l_sa[l]) begin
               l_data[l] <= bm_of(q[l][0]); l_da[l] <= 0; void'(q[l].pop_front()); st[l] = 2;
             end
          default: st[l] = 0;
        endcase
      end
    end
  end

  // ----------------------------------------------------------- P3 side
  word_t got [$];
  int got_t [$], ends [$], dones [$];
  bit second = 0;
  word_t w1;
  always @(posedge clk) begin
    if (!rst_n) second <= 0;
    else begin
      if (second) begin
        check(r_data == bm_of(w1), $sformatf("bitmap word of %h", w1));
        second <= 0;
      end else if (r_da && r_sa) begin
        w1 = r_data; got.push_back(r_data); got_t.push_back(cyc); second <= 1;
      end
      if (r_end) ends.push_back(cyc);
      if (ev_done) dones.push_back(cyc);
    end
  end
  always @(negedge clk) r_sa <= ($urandom_range(0, 2) != 0);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n1, first1;
    init = 0; eoh = 0; dec_seen = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    repeat (10) @(negedge clk);
    eoh = 1;
    @(negedge clk); eoh = 0;
    while (dones.size() == 0 && cyc < 3000) @(negedge clk);
    repeat (10) @(negedge clk);

    check(opc_log.size() == 3, $sformatf("%0d OPCODE words, expected 3", opc_log.size()));
    if (opc_log.size() == 3)
      check(opc_log[0] == OP_INIT && opc_log[1] == OP_DEC_THR && opc_log[2] == 4'd5, "OPCODE words");
    check(got.size() == 12 + 8, $sformatf("%0d roads, expected 20", got.size()));
    check(ends.size() == 2, $sformatf("%0d road_end pulses", ends.size()));
    check(dones.size() == 1, "one event_done");
    if (ends.size() == 2 && dones.size() == 1) check(dones[0] == ends[1], "event_done with the last road_end");
    n1 = 0; first1 = 1 << 30;
    for (int k = 0; k < got.size(); k++) begin
      if (got[k][16]) begin n1++; if (got_t[k] < first1) first1 = got_t[k]; end
      else check(n1 == 0, "default road after a lowered-criterion road");
      for (int j = 0; j < k; j++) check(got[j] != got[k], "road delivered twice");
    end
    if (ends.size() > 0) check(ends[0] < first1, $sformatf("lowered-criterion roads wait for road_end (%0d %0d)", ends[0], first1));

    // ---- test mode: VME road source replaces the LAMBs
    tmode = 1;
    @(negedge clk);
    q[0].push_back(mk(3, 0, 7));
    for (int p = 0; p < 3; p++) begin
      for (int w = 0; w < 2; w++) begin
        while (!v_rdy) @(negedge clk);
        v_we = 1; v_road = (w == 0) ? mk(2, p, p) : bm_of(mk(2, p, p));
        @(negedge clk); v_we = 0;
      end
    end
    n1 = 0;
    while (got.size() < 23 && n1 < 500) begin @(negedge clk); n1++; end
    repeat (30) @(negedge clk);
    check(got.size() == 23, $sformatf("%0d roads after test mode, expected 23", got.size()));
    for (int p = 0; p < 3 && 20 + p < got.size(); p++)
      check(got[20 + p] == mk(2, p, p), $sformatf("VME road %0d: got %h", p, got[20 + p]));
    tmode = 0;
    n1 = 0;
    while (got.size() < 24 && n1 < 500) begin @(negedge clk); n1++; end
    check(got.size() == 24 && got[23] == mk(3, 0, 7), "LAMB road held in test mode passes afterwards");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
