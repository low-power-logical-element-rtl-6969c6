// End-to-end self-checking testbench for lp_le at its default configuration.
//
// For each of the fourteen operations the LE is meant to carry, the test
// writes the operation's configuration (le_pkg::op_cfg), first checking that
// configuration against truth tables written out here, then applies random
// data words and compares Sum, Carry and the selected output with a
// reference computed from the original, un-sorted data bits. The two-input
// operations hold Cin at 0 while the path separation is on, as the design
// requires. Sum is stored into the flip-flops at random and every output
// select code is read back against a model of the four stored values.
//
// Mechanisms counted, each of which must occur: configuration writes, data
// words actually re-ordered by the separation logic, words passed unsorted
// through the bypass, stores, and each output select source. It also counts
// transitions on the LUT select lines against those on the data inputs for
// the operations with separation on, and requires fewer. Clock 5 ns.
module tb_lp_le;
  import le_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       cfg_we;
  le_cfg_t    cfg;
  le_data_t   data;
  logic       store_en;
  logic [2:0] osel;
  logic       sum, carry, out;
  logic [3:0] ff_q;
  le_data_t   lut_sel;
  int checks = 0, failures = 0;

  lp_le dut (.clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg(cfg), .data(data),
             .store_en(store_en), .osel(osel), .sum(sum), .carry(carry),
             .ff_q(ff_q), .out(out), .lut_sel(lut_sel));

  always #2.5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (data=%b sum=%b carry=%b out=%b osel=%0d)", what, data, sum,
               carry, out, osel);
    end
  endtask

  // Reference written independently of the package: {Sum, Carry}.
  function automatic logic [1:0] ref_op(le_op_e op, logic a, logic b, logic c);
    unique case (op)
      OP_AND:    ref_op = {a && b, 1'b0};
      OP_OR:     ref_op = {a || b, 1'b0};
      OP_NAND:   ref_op = {!(a && b), 1'b0};
      OP_NOR:    ref_op = {!(a || b), 1'b0};
      OP_XOR:    ref_op = {a != b, 1'b0};
      OP_XNOR:   ref_op = {a == b, 1'b0};
      OP_INV:    ref_op = {!a, 1'b0};
      OP_ADD:    ref_op = {1'((int'(a) + int'(b) + int'(c)) % 2),
                           1'((int'(a) + int'(b) + int'(c)) / 2)};
      OP_CMP_EQ: ref_op = {a == b, 1'b0};
      OP_CMP_LT: ref_op = {int'(a) < int'(b), 1'b0};
      OP_CMP_GT: ref_op = {int'(a) > int'(b), 1'b0};
      OP_SHL:    ref_op = {c, a};
      OP_SHR:    ref_op = {b, a};
      OP_MULT:   ref_op = {1'(int'(a) * int'(b)), 1'b0};
      default:   ref_op = 2'b00;
    endcase
  endfunction

  function automatic bit ref_sortable(le_op_e op);
    return op inside {OP_AND, OP_OR, OP_NAND, OP_NOR, OP_XOR, OP_XNOR, OP_ADD, OP_CMP_EQ, OP_MULT};
  endfunction

  function automatic bit ref_reads_cin(le_op_e op);
    return op inside {OP_ADD, OP_SHL};
  endfunction

  function automatic bit is_sorted(le_data_t d);
    return d inside {3'b000, 3'b100, 3'b110, 3'b111};
  endfunction

  int n_cfg = 0, n_reordered = 0, n_bypassed = 0, n_store = 0;
  int n_osel [5] = '{0, 0, 0, 0, 0};
  int tog_data = 0, tog_sel = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit       model [4];
    le_cfg_t  c;
    le_op_e   op;
    logic [1:0] r;
    le_data_t prev_data, prev_sel;
    bit       exp;
    rst_n = 1'b1;
    cfg_we = 1'b0;
    cfg = '0;
    data = '0;
    store_en = 1'b0;
    osel = 3'(OSEL_LUT);
    #1 rst_n = 1'b0;
    #4 check(ff_q == 4'b0000, "reset clears storage");
    foreach (model[i]) model[i] = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;

    for (int k = 0; k < 14; k++) begin
      op = le_op_e'(k);
      c = op_cfg(op);
      for (int i = 0; i < 8; i++) begin
        r = ref_op(op, i[2], i[1], i[0]);
        check(c.sum_lut[i] == r[1] && c.carry_lut[i] == r[0], "op_cfg truth table");
      end
      check(c.reorg_en == ref_sortable(op), "op_cfg separation flag");
      // Program the LE.
      @(negedge clk);
      store_en = 1'b0;
      cfg = c;
      cfg_we = 1'b1;
      @(negedge clk);
      cfg_we = 1'b0;
      cfg = '0;
      n_cfg++;
      prev_data = '0;
      prev_sel = '0;
      for (int v = 0; v < 100; v++) begin
        data = le_data_t'($urandom);
        if (ref_sortable(op) && !ref_reads_cin(op)) data[0] = 1'b0;
        store_en = ($urandom % 2) != 0;
        osel = 3'($urandom % 5);
        #0.5;
        r = ref_op(op, data[2], data[1], data[0]);
        check(sum == r[1], "sum");
        check(carry == r[0], "carry");
        exp = (osel == 3'(OSEL_LUT)) ? r[1] : model[osel[1:0]];
        check(out == exp, "selected output");
        n_osel[osel]++;
        if (!is_sorted(data)) begin
          if (lut_sel != data) n_reordered++;
          else                      n_bypassed++;
        end
        check(lut_sel == (ref_sortable(op) ? le_data_t'({data[2] | data[1] | data[0],
              ($countones(data) >= 2), &data}) : data), "LUT select lines");
        if (ref_sortable(op)) begin
          tog_data += $countones(data ^ prev_data);
          tog_sel  += $countones(lut_sel ^ prev_sel);
        end
        prev_data = data;
        prev_sel  = lut_sel;
        @(posedge clk);
        if (store_en) begin
          for (int i = 3; i > 0; i--) model[i] = model[i-1];
          model[0] = r[1];
          n_store++;
        end
        #0.5;
        check(ff_q == {model[3], model[2], model[1], model[0]}, "storage contents");
        store_en = 1'b0;
        @(negedge clk);
      end
    end

    $display("configuration writes %0d, re-ordered words %0d, bypassed words %0d, stores %0d",
             n_cfg, n_reordered, n_bypassed, n_store);
    $display("output select use: ff0 %0d ff1 %0d ff2 %0d ff3 %0d lut %0d",
             n_osel[0], n_osel[1], n_osel[2], n_osel[3], n_osel[4]);
    $display("transitions with separation on: data inputs %0d, LUT select lines %0d",
             tog_data, tog_sel);
    check(n_cfg == 14, "every operation configured");
    check(n_reordered > 0, "separation re-ordered data");
    check(n_bypassed > 0, "bypass passed unsorted data");
    check(n_store > 0, "stores happened");
    foreach (n_osel[i]) check(n_osel[i] > 0, "each output select source used");
    check(tog_sel < tog_data, "select lines switch less than data inputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
