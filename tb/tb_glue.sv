// tb_glue -- self-checking test of the LAMB GLUE.
//
// Four behavioural chain models stand in for the AM chip pipelines: each
// holds a queue of road packets per matching criterion, sends them with the
// DA/SA packet protocol, raises wired_DA while it holds roads, and produces
// its roads for the lowered threshold three cycles after it sees the DATA
// word of OP_DEC_THR on its OPCODE bus. Chain c has 3c roads for the default
// criterion and two for the lowered one, so chain 0 can move on to the new
// criterion long before chain 3. The output Space Available is random after
// the first packet. Checks: every packet arrives whole and once; no road of
// the second criterion leaves before the first Road_end, which follows the
// last road of the first criterion; two Road_end pulses; the first packet
// takes three cycles from the chain handshake to the output handshake; and
// chain 0 gets OP_DEC_THR before chain 3.
module tb_glue;
  import am_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  word_t [N_CHAINS-1:0] c_data;
  logic  [N_CHAINS-1:0] c_da, c_sa, c_wda;
  logic  [N_CHAINS-1:0][OPC_W-1:0] c_opc;
  logic [OPC_W-1:0] opc_in;
  word_t r_data;
  logic r_da, r_sa, r_end;

  glue #(.N_WAIT(8)) dut (
    .clk(clk), .rst_n(rst_n), .chain_data_i(c_data), .chain_da_i(c_da),
    .chain_sa_o(c_sa), .chain_wda_i(c_wda), .chain_opc_o(c_opc),
    .opc_i(opc_in), .road_data_o(r_data), .road_da_o(r_da),
    .road_sa_i(r_sa), .road_end_o(r_end));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_t mk(int crit, int c, int i);
    return word_t'((crit << 16) | (c << 12) | i);
  endfunction
  function automatic word_t bm_of(word_t a);
    return a ^ 18'h15555;
  endfunction

  // ------------------------------------------------------ chain models
  word_t q [N_CHAINS][$];
  int    st [N_CHAINS];
  int    dec_seen [N_CHAINS];
  int    load_at [N_CHAINS];
  logic  [N_CHAINS-1:0] prev_dec;
  int    cyc = 0;
  int    first_hs = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int c = 0; c < N_CHAINS; c++) begin
      if (!rst_n) begin
        st[c] = 0; c_da[c] <= 0; c_data[c] <= '0; c_wda[c] <= 0; prev_dec[c] <= 0;
      end else begin
        prev_dec[c] <= (c_opc[c] == OP_DEC_THR);
        if (prev_dec[c]) begin dec_seen[c] = cyc; load_at[c] = cyc + 3; end
        if (load_at[c] == cyc) for (int i = 0; i < 2; i++) q[c].push_back(mk(1, c, i));
        case (st[c])
          0: if (q[c].size() > 0) begin c_data[c] <= q[c][0]; c_da[c] <= 1; st[c] = 1; end
          1: if (c_sa[c]) begin
               if (first_hs < 0) first_hs = cyc;
               c_data[c] <= bm_of(q[c][0]); c_da[c] <= 0; void'(q[c].pop_front()); st[c] = 2;
             end
          default: st[c] = 0;
        endcase
        c_wda[c] <= (q[c].size() > 0) || (st[c] != 0) || (load_at[c] > cyc);
      end
    end
  end

  // ------------------------------------------------------ output side
  word_t got [$];
  int    got_t [$];
  int    ends [$];
  bit    second = 0;
  word_t w1;
  int    first_out = -1;
  always @(posedge clk) begin
    if (!rst_n) second <= 0;
    else begin
      if (second) begin
        check(r_data == bm_of(w1), $sformatf("bitmap word of %h", w1));
        second <= 0;
      end else if (r_da && r_sa) begin
        if (first_out < 0) first_out = cyc;
        w1 = r_data; got.push_back(r_data); got_t.push_back(cyc); second <= 1;
      end
      if (r_end) ends.push_back(cyc);
    end
  end
  always @(negedge clk) r_sa <= (got.size() == 0) ? 1'b1 : ($urandom_range(0, 2) != 0);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n0, n1, last0, first1, exp_total;
    opc_in = OP_NOP;
    for (int c = 0; c < N_CHAINS; c++) begin dec_seen[c] = -1; load_at[c] = -1; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); opc_in = OP_INIT;
    @(negedge clk); opc_in = OP_NOP;
    repeat (6) @(negedge clk);
    // roads of the default criterion appear in the chains
    for (int c = 0; c < N_CHAINS; c++)
      for (int i = 0; i < 3 * c; i++) q[c].push_back(mk(0, c, i));
    repeat (4) @(negedge clk);
    // End-of-Hit: lower the threshold
    opc_in = OP_DEC_THR;
    @(negedge clk); opc_in = 4'd5;
    @(negedge clk); opc_in = OP_NOP;
    while (ends.size() < 2 && cyc < 2000) @(negedge clk);
    repeat (5) @(negedge clk);

    exp_total = 0;
    for (int c = 0; c < N_CHAINS; c++) exp_total += 3 * c + 2;
    check(got.size() == exp_total, $sformatf("%0d roads out, expected %0d", got.size(), exp_total));
    check(ends.size() == 2, $sformatf("%0d Road_end pulses, expected 2", ends.size()));
    n0 = 0; n1 = 0; last0 = -1; first1 = 1 << 30;
    for (int k = 0; k < got.size(); k++) begin
      if (got[k][16]) begin n1++; if (got_t[k] < first1) first1 = got_t[k]; end
      else begin
        n0++; last0 = got_t[k];
        check(n1 == 0, "default-criterion road after a lowered-threshold road");
      end
      for (int j = 0; j < k; j++) check(got[j] != got[k], "road delivered twice");
    end
    check(n0 == 18 && n1 == 8, $sformatf("criterion split %0d/%0d", n0, n1));
    if (ends.size() == 2) begin
      check(ends[0] > last0 + 1, "first Road_end after the last default road left");
      check(ends[0] < first1, "second-criterion roads wait for the first Road_end");
      check(ends[1] > got_t[got.size()-1] + 1, "second Road_end after the last road");
    end
    check(first_out - first_hs == 3, $sformatf("input-to-output %0d cycles, expected 3", first_out - first_hs));
    check(dec_seen[0] >= 0 && dec_seen[0] < dec_seen[3], "chain 0 moved on before chain 3");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
