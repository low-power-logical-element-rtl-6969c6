// Self-checking testbench for le_data_reorg.
//
// Applies all eight data words and checks the re-organized word against a
// reference built from the number of 1s in the input (a thermometer code:
// D0_new = count>=1, D1_new = count>=2, Cin_new = count==3). It also checks
// the rows of the adder table the design is meant to reproduce, and that a
// full adder's Sum and Carry read from the re-organized word equal those of
// the original word. The block is combinational; a watchdog bounds the run.
module tb_le_data_reorg;
  import le_pkg::*;

  le_data_t d_old, d_new;
  int checks = 0, failures = 0;

  le_data_reorg dut (.d_old(d_old), .d_new(d_new));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (d_old=%b d_new=%b)", what, d_old, d_new);
    end
  endtask

  // Expected re-organized words for inputs 0..7 ({D0, D1, Cin} rows).
  localparam logic [2:0] TABLE_NEW [8] = '{3'b000, 3'b100, 3'b100, 3'b110,
                                           3'b100, 3'b110, 3'b110, 3'b111};

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic s_old, c_old, s_new, c_new;
    for (int i = 0; i < 8; i++) begin
      d_old = 3'(i);
      #1;
      n = int'(d_old[2]) + int'(d_old[1]) + int'(d_old[0]);
      check(d_new == {n >= 1, n >= 2, n == 3}, "thermometer code of the 1s count");
      check(d_new == TABLE_NEW[i], "adder table row");
      s_old = ^d_old;
      c_old = n >= 2;
      s_new = ^d_new;
      c_new = (d_new[2] & d_new[1]) | (d_new[0] & (d_new[2] ^ d_new[1]));
      check(s_old == s_new, "adder Sum unchanged by re-organization");
      check(c_old == c_new, "adder Carry unchanged by re-organization");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
