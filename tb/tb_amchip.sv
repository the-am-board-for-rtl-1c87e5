// tb_amchip -- self-checking test of the associative memory chip.
//
// A 16-pattern chip is loaded with distinct patterns (pattern p, layer l
// holds superstrip 8p+l). The test checks, against expectations written out
// by hand: the 6/6 road with the XFT layer required comes out during the
// hit phase; after OP_DEC_THR to 5 only the newly passing 5/6 road comes
// out (the first one is not repeated, a road without the XFT layer never
// comes); a packet from the upstream chip is passed on unchanged; wired_DA
// rises two cycles after the hit is captured and falls once all is read;
// OP_INIT clears the event. The downstream Space Available is random.
module tb_amchip;
  import am_pkg::*;

  localparam int unsigned NP = 16;
  localparam int unsigned PW = 4;
  localparam int unsigned ID = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  layer_hit_t [N_LAYERS-1:0] hit;
  logic [OPC_W-1:0] opc;
  logic pat_we;
  logic [PW-1:0] pat_addr;
  logic [N_LAYERS-1:0][SS_W-1:0] pat_ss;
  word_t up_data, dn_data;
  logic up_da, up_sa, dn_da, dn_sa, wda;

  amchip #(.NPATT(NP), .CHIP_ID(ID)) dut (
    .clk(clk), .rst_n(rst_n), .hit_i(hit), .opc_i(opc),
    .cfg_thr_i(4'd6), .cfg_req_i(2'b01),
    .pat_we_i(pat_we), .pat_addr_i(pat_addr), .pat_ss_i(pat_ss),
    .up_data_i(up_data), .up_da_i(up_da), .up_sa_o(up_sa),
    .dn_data_o(dn_data), .dn_da_o(dn_da), .dn_sa_i(dn_sa),
    .wired_da_o(wda));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Downstream receiver.
  word_t got_a [$];
  word_t got_b [$];
  bit second = 0;
  always @(posedge clk) begin
    if (!rst_n) second <= 0;
    else if (second) begin got_b.push_back(dn_data); second <= 0; end
    else if (dn_da && dn_sa) begin got_a.push_back(dn_data); second <= 1; end
  end
  always @(negedge clk) dn_sa <= ($urandom_range(0, 3) != 0);

  task automatic send_hit(int layer, int ss);
    @(negedge clk);
    hit = '0;
    hit[layer].valid = 1'b1;
    hit[layer].ss = SS_W'(ss);
    @(negedge clk);
    hit = '0;
  endtask

  task automatic send_opc(logic [OPC_W-1:0] w);
    @(negedge clk); opc = w;
    @(negedge clk); opc = OP_NOP;
  endtask

  function automatic word_t addr_of(int p);
    return word_t'({14'(ID), PW'(p)});
  endfunction

  task automatic expect_road(int p, logic [5:0] bm, string what);
    check(got_a.size() > 0, {what, ": road present"});
    if (got_a.size() > 0) begin
      word_t a, b;
      a = got_a.pop_front();
      b = got_b.pop_front();
      check(a == addr_of(p), $sformatf("%s: address %h expected %h", what, a, addr_of(p)));
      check(b == word_t'(bm), $sformatf("%s: bitmap %h expected %h", what, b, bm));
    end
  endtask

  task automatic wait_idle();
    int n = 0;
    repeat (4) @(posedge clk);
    while ((wda || dn_da || second) && n < 200) begin @(posedge clk); n++; end
    repeat (2) @(posedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    hit = '0; opc = OP_NOP; pat_we = 0; pat_addr = '0; pat_ss = '0;
    up_data = '0; up_da = 0; dn_sa = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      pat_we = 1; pat_addr = PW'(p);
      for (int l = 0; l < N_LAYERS; l++) pat_ss[l] = SS_W'(8 * p + l);
    end
    @(negedge clk); pat_we = 0;

    send_opc(OP_INIT);
    repeat (3) @(negedge clk);
    // pattern 7: five layers incl. XFT, pattern 9: five layers without XFT
    for (int l = 0; l < 5; l++) send_hit(l, 8 * 7 + l);
    for (int l = 1; l < 6; l++) send_hit(l, 8 * 9 + l);
    // pattern 3: all six layers; time the last hit to wired_DA
    for (int l = 0; l < 5; l++) send_hit(l, 8 * 3 + l);
    check(!wda, "wired_DA low before any road");
    @(negedge clk); hit = '0; hit[5].valid = 1; hit[5].ss = SS_W'(8 * 3 + 5);
    @(negedge clk); hit = '0;   // the hit was captured on the edge just passed
    lat = 0;
    while (!wda && lat < 20) begin @(posedge clk); #1; lat++; end
    check(lat == 2, $sformatf("wired_DA latency %0d cycles, expected 2", lat));
    wait_idle();
    check(got_a.size() == 1, $sformatf("one road at THR 6, got %0d", got_a.size()));
    expect_road(3, 6'h3F, "6/6 road");
    check(!wda, "wired_DA low after read-out");

    // Lower the threshold to 5.
    @(negedge clk); opc = OP_DEC_THR;
    @(negedge clk); opc = 4'd5;
    @(negedge clk); opc = OP_NOP;
    wait_idle();
    check(got_a.size() == 1, $sformatf("one new road at THR 5, got %0d", got_a.size()));
    expect_road(7, 6'h1F, "5/6 road");

    // Upstream packet passes through.
    @(negedge clk); up_da = 1; up_data = 18'h2ABCD;
    while (!up_sa) @(negedge clk);
    @(negedge clk); up_da = 0; up_data = 18'h00015;
    @(negedge clk); up_data = '0;
    wait_idle();
    check(got_a.size() == 1, "upstream packet delivered");
    if (got_a.size() > 0) begin
      check(got_a.pop_front() == 18'h2ABCD, "upstream Road-ADD word");
      check(got_b.pop_front() == 18'h00015, "upstream bitmap word");
    end

    // New event: INIT clears; five hits of pattern 3 stay below THR 6.
    send_opc(OP_INIT);
    for (int l = 1; l < 6; l++) send_hit(l, 8 * 3 + l);
    wait_idle();
    check(got_a.size() == 0, "no road after INIT with 5 layers at THR 6");
    send_hit(0, 8 * 3);
    wait_idle();
    check(got_a.size() == 1, "road again once the sixth layer fires");
    expect_road(3, 6'h3F, "6/6 road in the new event");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
