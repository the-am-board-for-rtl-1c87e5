// tb_lamb -- self-checking test of one LAMB (INDIs, chip chains, GLUE).
//
// A LAMB with two chips per chain and eight patterns per chip (64 patterns)
// is loaded with random superstrips from a small range. The test plays the
// TOP GLUE: it sends OP_INIT (default THR 6, XFT layer required), drives
// hits on the six layer buses, then OP_DEC_THR with DATA 5, and reads the
// road bus with a random Space Available. A reference built here from the
// hits and the pattern table gives the roads of each criterion; each packet
// must carry the right Road-ADD ({LAMB_ID, chain, chip, pattern}) and
// bitmap and arrive in the right criterion (counted by Road_end pulses),
// every expected road once. Three events are run.
module tb_lamb;
  import am_pkg::*;

  localparam int unsigned C   = 2;
  localparam int unsigned NP  = 8;
  localparam int unsigned PW  = 3;
  localparam int unsigned NG  = N_CHAINS * C;
  localparam int unsigned LID = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  layer_hit_t [N_LAYERS-1:0] hit;
  logic [OPC_W-1:0] opc;
  logic pat_we;
  logic [2:0] pat_chip;
  logic [PW-1:0] pat_addr;
  logic [N_LAYERS-1:0][SS_W-1:0] pat_ss;
  word_t r_data;
  logic r_da, r_sa, r_end;

  lamb #(.LAMB_ID(LID), .CHIPS(C), .NPATT(NP)) dut (
    .clk(clk), .rst_n(rst_n), .hit_i(hit), .opc_i(opc),
    .cfg_thr_i(4'd6), .cfg_req_i(2'b01),
    .pat_we_i(pat_we), .pat_chip_i(pat_chip), .pat_addr_i(pat_addr), .pat_ss_i(pat_ss),
    .road_data_o(r_data), .road_da_o(r_da), .road_sa_i(r_sa), .road_end_o(r_end));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [SS_W-1:0]     tpat [NG][NP][N_LAYERS];
  logic [N_LAYERS-1:0] bmref [NG][NP];

  function automatic bit ref_pass(logic [N_LAYERS-1:0] bm, int thr);
    int n = 0;
    for (int l = 0; l < N_LAYERS; l++) if (bm[l]) n++;
    return bm[0] && n >= thr;
  endfunction

  word_t rx_a [$];
  word_t rx_b [$];
  int rx_crit [$];
  int n_end = 0;
  bit second = 0;
  always @(posedge clk) begin
    if (!rst_n) second <= 0;
    else begin
      if (second) begin rx_b.push_back(r_data); second <= 0; end
      else if (r_da && r_sa) begin rx_a.push_back(r_data); rx_crit.push_back(n_end); second <= 1; end
      if (r_end) n_end++;
    end
  end
  always @(negedge clk) r_sa <= ($urandom_range(0, 2) != 0);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_hit(int l, int s);
    @(negedge clk);
    hit = '0; hit[l].valid = 1; hit[l].ss = SS_W'(s);
    for (int g = 0; g < NG; g++) for (int p = 0; p < NP; p++)
      if (tpat[g][p][l] == SS_W'(s)) bmref[g][p][l] = 1'b1;
    @(negedge clk); hit = '0;
  endtask

  initial begin
    hit = '0; opc = OP_NOP; pat_we = 0; pat_chip = '0; pat_addr = '0; pat_ss = '0;
    for (int g = 0; g < NG; g++) for (int p = 0; p < NP; p++) for (int l = 0; l < N_LAYERS; l++)
      tpat[g][p][l] = SS_W'($urandom_range(0, 15));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < NG; g++) for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      pat_we = 1; pat_chip = 3'(g); pat_addr = PW'(p);
      for (int l = 0; l < N_LAYERS; l++) pat_ss[l] = tpat[g][p][l];
    end
    @(negedge clk); pat_we = 0;

    for (int ev = 0; ev < 3; ev++) begin
      automatic int base = n_end, nexp = 0;
      bit seen [NG][NP];
      for (int g = 0; g < NG; g++) for (int p = 0; p < NP; p++) begin bmref[g][p] = '0; seen[g][p] = 0; end
      rx_a.delete(); rx_b.delete(); rx_crit.delete();
      @(negedge clk); opc = OP_INIT;
      @(negedge clk); opc = OP_NOP;
      repeat (4) @(negedge clk);
      for (int r = 0; r < 6; r++) begin
        automatic int g = $urandom_range(0, NG - 1), p = $urandom_range(0, NP - 1);
        for (int l = 0; l < N_LAYERS; l++) if ($urandom_range(0, 5) != 0) send_hit(l, tpat[g][p][l]);
      end
      repeat (2) @(negedge clk);
      opc = OP_DEC_THR;
      @(negedge clk); opc = 4'd5;
      @(negedge clk); opc = OP_NOP;
      begin
        automatic int w = 0;
        while (n_end < base + 2 && w < 5000) begin @(negedge clk); w++; end
      end
      repeat (5) @(negedge clk);
      check(n_end == base + 2, $sformatf("event %0d: two Road_end pulses", ev));
      for (int g = 0; g < NG; g++) for (int p = 0; p < NP; p++) if (ref_pass(bmref[g][p], 5)) nexp++;
      check(rx_a.size() == nexp, $sformatf("event %0d: %0d roads, expected %0d", ev, rx_a.size(), nexp));
      for (int k = 0; k < rx_a.size(); k++) begin
        automatic int g = int'(rx_a[k] >> PW) - int'(LID * NG), p = int'(rx_a[k] & word_t'(NP - 1));
        check(g >= 0 && g < NG, $sformatf("road %h from this LAMB", rx_a[k]));
        if (g >= 0 && g < NG) begin
          check(!seen[g][p], $sformatf("road %h once", rx_a[k]));
          seen[g][p] = 1;
          check(ref_pass(bmref[g][p], 5), $sformatf("road %h should match", rx_a[k]));
          check(rx_b[k] == word_t'(bmref[g][p]), $sformatf("road %h bitmap", rx_a[k]));
          check(rx_crit[k] - base == (ref_pass(bmref[g][p], 6) ? 0 : 1), $sformatf("road %h criterion", rx_a[k]));
        end
      end
      $display("event %0d: %0d roads", ev, rx_a.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
