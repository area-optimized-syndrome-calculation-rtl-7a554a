// Self-checking testbench for cse_xor_network.
//
// Three instances:
//  * the default: multiplication by alpha^12 in GF(2^4) (x^4+x+1).  Every one
//    of the 16 inputs is compared with a reference field product, and the
//    network must use 3 XOR gates built from 2 shared terms (6 without
//    sharing);
//  * the same matrix with the search disabled (MAX_TERMS = 0): 6 XOR gates;
//  * a 12 x 10 matrix with many overlapping rows, checked against a direct
//    matrix product for random inputs; sharing must not cost gates.
module tb_cse_xor_network;
  import tb_gf_pkg::*;

  localparam logic [119:0] BIG = 120'h9F3_A5C_7E1_B6D_C39_5AF_E27_8D4_F1B_6C8;

  logic [3:0]  a;
  logic [3:0]  b_cse;
  logic [3:0]  b_plain;
  logic [11:0] x;
  logic [9:0]  y;
  logic        clk = 1'b0;

  int checks   = 0;
  int failures = 0;

  cse_xor_network dut (.in_bits(a), .out_bits(b_cse));

  cse_xor_network #(.MAX_TERMS(0)) dut_plain (.in_bits(a), .out_bits(b_plain));

  cse_xor_network #(.N_IN(12), .N_OUT(10), .MATRIX(BIG)) dut_big (.in_bits(x), .out_bits(y));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [9:0] big_ref(logic [11:0] v);
    logic [9:0] r;
    r = '0;
    for (int i = 0; i < 12; i++)
      if (v[i]) r = r ^ BIG[i*10 +: 10];
    return r;
  endfunction

  int plain_big;

  initial begin
    check(dut.xor_count == 3, $sformatf("alpha^12 XOR count %0d, expected 3", dut.xor_count));
    check(dut.new_terms == 2, $sformatf("alpha^12 shared terms %0d, expected 2", dut.new_terms));
    check(dut_plain.xor_count == 6,
          $sformatf("unshared XOR count %0d, expected 6", dut_plain.xor_count));
    plain_big = 0;
    for (int c = 0; c < 10; c++) begin
      int ones = 0;
      for (int r = 0; r < 12; r++) ones += int'(BIG[r*10 + c]);
      if (ones > 1) plain_big += ones - 1;
    end
    check(dut_big.xor_count < plain_big,
          $sformatf("12x10 XOR count %0d not below %0d", dut_big.xor_count, plain_big));
    $display("12x10 matrix: %0d XOR gates shared, %0d unshared", dut_big.xor_count, plain_big);

    for (int v = 0; v < 16; v++) begin
      a = 4'(v);
      #1;
      check(b_cse == 4'(ref_mul(16'(v), ref_pow_alpha(12, 4, 'h13), 4, 'h13)),
            $sformatf("alpha^12 * %h = %h", v, b_cse));
      check(b_plain == b_cse, $sformatf("unshared network differs for %h", v));
    end
    for (int n = 0; n < 200; n++) begin
      x = 12'($urandom);
      #1;
      check(y == big_ref(x), $sformatf("12x10 product for %h: %h", x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
