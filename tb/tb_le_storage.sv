// Self-checking testbench for le_storage.
//
// Drives random Sum values and store enables and keeps its own model of the
// four stored values (newest first). Every cycle it checks the flip-flop
// contents and the output for all eight select codes: 0..3 a flip-flop,
// 4 the direct Sum, 5..7 zero. Checks that reset clears the flip-flops.
// Clock period 5 ns; a watchdog bounds the run.
module tb_le_storage;
  import le_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       store_en;
  logic       sum_in;
  logic [2:0] osel;
  logic [3:0] ff_q;
  logic       out;
  int checks = 0, failures = 0;

  le_storage dut (.clk(clk), .rst_n(rst_n), .store_en(store_en), .sum_in(sum_in),
                  .osel(osel), .ff_q(ff_q), .out(out));

  always #2.5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (osel=%0d ff_q=%b out=%b)", what, osel, ff_q, out);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit model [4];
    bit exp;
    rst_n = 1'b1;
    store_en = 1'b0;
    sum_in = 1'b0;
    osel = 3'd0;
    #1 rst_n = 1'b0;
    #1;
    check(ff_q == 4'b0000, "reset clears flip-flops");
    @(negedge clk);
    rst_n = 1'b1;
    foreach (model[i]) model[i] = 1'b0;
    for (int cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      sum_in = 1'($urandom);
      store_en = ($urandom % 4) != 0;
      for (int s = 0; s < 8; s++) begin
        osel = 3'(s);
        #0.1;
        exp = (s < 4) ? model[s] : (s == 4) ? sum_in : 1'b0;
        check(out == exp, "output select");
      end
      @(posedge clk);
      if (store_en) begin
        for (int i = 3; i > 0; i--) model[i] = model[i-1];
        model[0] = sum_in;
      end
      #0.1;
      check(ff_q == {model[3], model[2], model[1], model[0]}, "flip-flop contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
