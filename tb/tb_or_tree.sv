// tb_or_tree: OR trees of 8, 6 and 24 inputs. The 8- and 6-input trees are
// checked on every input value, the 24-input tree on zero, every one-hot value
// and random values.
module tb_or_tree;
  logic [7:0]  i8;
  logic [5:0]  i6;
  logic [23:0] i24;
  logic        o8, o6, o24;
  int checks = 0, failures = 0;

  or_tree #(.N(8))  dut8  (.in_i(i8),  .or_o(o8));
  or_tree #(.N(6))  dut6  (.in_i(i6),  .or_o(o6));
  or_tree #(.N(24)) dut24 (.in_i(i24), .or_o(o24));

  function automatic logic any_one(logic [23:0] v, int n);
    for (int k = 0; k < n; k++) if (v[k]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      i8 = 8'(v); i6 = 6'(v); i24 = '0;
      #1;
      check(o8, any_one(24'(v), 8), "or8");
      check(o6, any_one(24'(v), 6), "or6");
    end
    i24 = '0; #1; check(o24, 1'b0, "or24 zero");
    for (int k = 0; k < 24; k++) begin
      i24 = 24'(1) << k; #1;
      check(o24, 1'b1, "or24 onehot");
    end
    for (int n = 0; n < 200; n++) begin
      i24 = 24'($urandom) & 24'($urandom) & 24'($urandom) & 24'($urandom);
      #1;
      check(o24, any_one(i24, 24), "or24 random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
