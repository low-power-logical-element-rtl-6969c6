// Self-checking testbench for le_sram_lut.
//
// Writes random 8-bit truth tables and reads every address through the mux,
// comparing with the written word. It checks that a write takes effect only
// at the clock edge (the old table is still read just before it), and that
// the table holds while we is low. Clock period 5 ns; a watchdog bounds the run.
module tb_le_sram_lut;
  import le_pkg::*;

  logic       clk = 1'b0;
  logic       we;
  logic [7:0] wdata;
  le_data_t   addr;
  logic       q;
  int checks = 0, failures = 0;

  le_sram_lut dut (.clk(clk), .we(we), .wdata(wdata), .addr(addr), .q(q));

  always #2.5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (addr=%0d q=%b)", what, addr, q);
    end
  endtask

  task automatic read_all(logic [7:0] exp, string what);
    for (int a = 0; a < 8; a++) begin
      addr = 3'(a);
      #0.1;
      check(q == exp[a], what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] table_now, next;
    we = 1'b0;
    wdata = '0;
    addr = '0;
    // First write, with walking-one patterns to catch address swaps.
    table_now = 8'h00;
    for (int k = 0; k < 40; k++) begin
      next = (k < 8) ? 8'(1 << k) : 8'($urandom);
      @(negedge clk);
      we = 1'b1;
      wdata = next;
      if (k > 0) read_all(table_now, "old table read before write edge");
      @(negedge clk);
      we = 1'b0;
      wdata = ~next;      // must not be written while we is low
      table_now = next;
      read_all(table_now, "new table read after write");
      @(negedge clk);
      read_all(table_now, "table holds with we low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
