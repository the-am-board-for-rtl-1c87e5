// tb_input_control -- self-checking test of the Input Control chip.
//
// Random hits (layer 0..7, random superstrip) are driven on the serial bus,
// from P3 or, in test mode, from the VME port. Each cycle the six layer
// buses are compared with the hit driven one cycle earlier: exactly the bus
// of its layer is valid and carries its superstrip; layers 6 and 7 are
// dropped; the source not selected by test mode is ignored.
module tb_input_control;
  import am_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic p3_v, vme_v, tm;
  logic [LAYER_W-1:0] p3_l, vme_l;
  logic [SS_W-1:0] p3_s, vme_s;
  layer_hit_t [N_LAYERS-1:0] hit;

  input_control dut (
    .clk(clk), .rst_n(rst_n), .p3_valid_i(p3_v), .p3_layer_i(p3_l), .p3_ss_i(p3_s),
    .test_mode_i(tm), .vme_valid_i(vme_v), .vme_layer_i(vme_l), .vme_ss_i(vme_s),
    .hit_o(hit));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ev; int el, es;
    p3_v = 0; vme_v = 0; tm = 0; p3_l = 0; vme_l = 0; p3_s = 0; vme_s = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      tm = (n >= 1000);
      p3_v = $urandom_range(0, 1); p3_l = LAYER_W'($urandom); p3_s = SS_W'($urandom);
      vme_v = $urandom_range(0, 1); vme_l = LAYER_W'($urandom); vme_s = SS_W'($urandom);
      ev = tm ? vme_v : p3_v; el = tm ? vme_l : p3_l; es = tm ? vme_s : p3_s;
      @(posedge clk); #1;
      for (int l = 0; l < N_LAYERS; l++) begin
        automatic bit want = ev && (el == l);
        check(hit[l].valid == want, $sformatf("layer %0d valid", l));
        if (want) check(hit[l].ss == SS_W'(es), $sformatf("layer %0d superstrip", l));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
