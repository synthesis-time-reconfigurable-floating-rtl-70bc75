// Self-checking testbench of the multiplier.
//
// Runs single precision (E=8/M=23), half precision (E=5/M=10) and the
// reduced format E=7/M=16 side by side. Directed cases cover rounding ties,
// products of 2 or more (normalisation shift), overflow to infinity,
// underflow to zero, inf * 0, NaNs and denormal inputs; random operands
// cover the rest. The exact double product, rounded by the reference model
// of fpu_ref_pkg, gives the expected result and flags. Outputs are checked
// one clock period after the inputs change.
module tb_fpu_mul;
  import fpu_pkg::*;
  import fpu_ref_pkg::*;

  localparam int NF = 3;
  localparam int FE [NF] = '{8, 5, 7};
  localparam int FM [NF] = '{23, 10, 16};
  localparam int NRAND = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done = 0;

  for (genvar g = 0; g < NF; g++) begin : g_fmt
    localparam int E = FE[g];
    localparam int M = FM[g];
    localparam int W = 1 + E + M;
    localparam int BIAS = (1 << (E - 1)) - 1;

    logic [W-1:0] a, b, r;
    fpu_status_t  fl;

    fpu_mul #(.E(E), .M(M)) dut (.a(a), .b(b), .result(r), .flags(fl));

    function automatic word_t mk(bit s, int ue, word_t man);
      return (word_t'(s) << (E + M)) | (word_t'(64'(ue) + 64'(BIAS)) << M) | (man & mask(M));
    endfunction

    task automatic check(word_t x, word_t y);
      word_t er;
      logic [3:0] ef;
      a = W'(x); b = W'(y);
      @(posedge clk);
      ref_mul(x, y, E, M, er, ef);
      checks++;
      if (word_t'(r) != er || fl != ef) begin
        failures++;
        if (failures < 20)
          $display("FAIL mul E=%0d M=%0d a=%h b=%h: got %h/%b exp %h/%b",
                   E, M, x, y, r, fl, er, ef);
      end
    endtask

    initial begin
      word_t x, y;
      check(mk(0, 0, 0), mk(1, 0, 0));                      // 1 * -1
      check(mk(0, 1, 1 << (M - 1)), mk(0, 1, 1 << (M - 1)));  // 3 * 3 = 9, shift
      check(mk(0, 0, mask(M)), mk(0, 0, mask(M)));          // near 4, rounding
      check(mk(0, 0, 1), mk(0, 0, 1 << (M - 1)));           // 1.5*(1+ulp)
      check(mk(0, BIAS, 0), mk(0, 2, 0));                   // overflow
      check(mk(1, 1 - BIAS, 0), mk(0, -2, 0));              // underflow
      check(mk(0, 1 - BIAS, mask(M)), mk(0, 0, mask(M)));   // rounds back to normal?
      check(inf(E, M, 0), 0);                               // inf * 0
      check(word_t'(1) << (E + M), inf(E, M, 1));           // -0 * -inf
      check(inf(E, M, 1), mk(0, 3, 3));
      check(qnan(E, M), inf(E, M, 0));
      check(mk(0, 0, 0), (qnan(E, M) & ~(word_t'(1) << (M - 1))) | 2);   // sNaN
      check(7, mk(1, 2, 2));                                // denormal * x
      for (int i = 0; i < NRAND; i++) begin
        x = rand_fp(E, M, 1'b0, 0);
        // keep half the products near the representable range
        y = rand_fp(E, M, i[0], (1 << E) - 1 - f_exp(x, E, M) + int'($urandom_range(4)) - 2);
        check(x, y);
      end
      done++;
    end
  end

  initial begin
    wait (done == NF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NF * (NRAND + 100) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
