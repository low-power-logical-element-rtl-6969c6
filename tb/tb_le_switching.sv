// Switching-activity workload for lp_le: the power comparison experiment.
//
// For each operation of the power comparison (AND, OR, NAND, NOR, XOR, ADD,
// one-bit MULT and equality COMPARE) the same 500 random data words are
// applied, one every 5 ns clock period, twice: once with the 0/1 path
// separation off, which makes the element a conventional LE, and once with
// it on. Every word's Sum and Carry are checked against a reference in both
// runs. The transitions on the three LUT select lines are counted in each
// run; with separation on they must be fewer, and the per-operation
// reduction is printed. Two-input operations hold Cin at 0.
//
// Expected reduction with uniform random data: for ADD the select lines
// carry a thermometer code whose bits are 1 with probability 7/8, 1/2, 1/8,
// giving 15/16 transitions per word against 3/2 (37.5 % fewer); for the
// two-input operations 3/4 against 1 (25 % fewer).
module tb_le_switching;
  import le_pkg::*;

  localparam int VECTORS = 500;
  localparam int NOPS = 8;
  localparam le_op_e OPS [NOPS] = '{OP_AND, OP_OR, OP_NAND, OP_NOR, OP_XOR,
                                    OP_ADD, OP_MULT, OP_CMP_EQ};

  logic       clk = 1'b0;
  logic       rst_n;
  logic       cfg_we;
  le_cfg_t    cfg;
  le_data_t   data;
  logic       sum, carry, out;
  logic [3:0] ff_q;
  le_data_t   lut_sel;
  int checks = 0, failures = 0;

  lp_le dut (.clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg(cfg), .data(data),
             .store_en(1'b0), .osel(3'(OSEL_LUT)), .sum(sum), .carry(carry),
             .ff_q(ff_q), .out(out), .lut_sel(lut_sel));

  always #2.5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (data=%b sum=%b carry=%b)", what, data, sum, carry);
    end
  endtask

  initial begin
    repeat (2 * NOPS * (VECTORS + 10) + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  le_data_t vec [VECTORS];

  initial begin
    int cnt, tog [2];
    logic es, ec;
    le_data_t prev;
    le_cfg_t c;
    rst_n = 1'b1;
    cfg_we = 1'b0;
    cfg = '0;
    data = '0;
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    for (int k = 0; k < NOPS; k++) begin
      for (int v = 0; v < VECTORS; v++) begin
        vec[v] = le_data_t'($urandom);
        if (OPS[k] != OP_ADD) vec[v][0] = 1'b0;
      end
      for (int mode = 0; mode < 2; mode++) begin
        c = op_cfg(OPS[k]);
        c.reorg_en = mode[0];
        @(negedge clk);
        cfg = c;
        cfg_we = 1'b1;
        data = '0;
        @(negedge clk);
        cfg_we = 1'b0;
        prev = lut_sel;
        tog[mode] = 0;
        for (int v = 0; v < VECTORS; v++) begin
          data = vec[v];
          #1;
          cnt = int'(data[2]) + int'(data[1]) + int'(data[0]);
          case (OPS[k])
            OP_AND:    begin es = cnt == 2;        ec = 1'b0;     end
            OP_OR:     begin es = cnt >= 1;        ec = 1'b0;     end
            OP_NAND:   begin es = cnt != 2;        ec = 1'b0;     end
            OP_NOR:    begin es = cnt == 0;        ec = 1'b0;     end
            OP_XOR:    begin es = cnt == 1;        ec = 1'b0;     end
            OP_ADD:    begin es = cnt[0];          ec = cnt >= 2; end
            OP_MULT:   begin es = cnt == 2;        ec = 1'b0;     end
            default:   begin es = cnt != 1;        ec = 1'b0;     end
          endcase
          check(sum == es, "sum");
          check(carry == ec, "carry");
          tog[mode] += $countones(lut_sel ^ prev);
          prev = lut_sel;
          @(negedge clk);
        end
      end
      $display("%-10s select-line transitions: conventional %0d, separated %0d, %0d %% fewer",
               OPS[k].name(), tog[0], tog[1], (100 * (tog[0] - tog[1])) / tog[0]);
      check(tog[1] < tog[0], "separation lowers select-line switching");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
