// Self-checking testbench of the float-to-integer converter.
//
// Runs single precision with a 32-bit integer and half precision with a
// 16-bit integer (the unit's integer is as wide as its floating-point word),
// each in signed and unsigned mode. Directed cases cover truncation of
// positive and negative fractions, the exact integer limits and one ulp
// beyond them, |a| < 1, infinities, NaNs and denormals; random operands are
// concentrated on exponents where the integer part is representable. The
// expected value is the truncated double computed by fpu_ref_pkg.
module tb_fpu_f2i;
  import fpu_pkg::*;
  import fpu_ref_pkg::*;

  localparam int NF = 2;
  localparam int FE [NF] = '{8, 5};
  localparam int FM [NF] = '{23, 10};
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

    logic [W-1:0] a, r;
    logic         sgn;
    fpu_status_t  fl;

    fpu_f2i #(.E(E), .M(M), .IW(W)) dut (.a(a), .int_signed(sgn), .result(r), .flags(fl));

    function automatic word_t mk(bit s, int ue, word_t man);
      return (word_t'(s) << (E + M)) | (word_t'(64'(ue) + 64'(BIAS)) << M) | (man & mask(M));
    endfunction

    task automatic check(word_t x, bit s);
      word_t er;
      logic [3:0] ef;
      a = W'(x); sgn = s;
      @(posedge clk);
      ref_f2i(x, s, E, M, W, er, ef);
      checks++;
      if (word_t'(r) != er || fl != ef) begin
        failures++;
        if (failures < 20)
          $display("FAIL f2i E=%0d M=%0d a=%h signed=%0d: got %h/%b exp %h/%b",
                   E, M, x, s, r, fl, er, ef);
      end
    endtask

    initial begin
      word_t x;
      for (int s = 0; s < 2; s++) begin
        check(mk(0, 0, 1 << (M - 1)), 1'(s));           // 1.5
        check(mk(1, 0, 1 << (M - 1)), 1'(s));           // -1.5
        check(mk(1, -1, 0), 1'(s));                     // -0.5
        check(mk(0, -3, 5), 1'(s));                     // 0.125..
        check(mk(0, W - 1, 0), 1'(s));                  // 2^(W-1)
        check(mk(1, W - 1, 0), 1'(s));                  // -2^(W-1)
        check(mk(1, W - 1, 1), 1'(s));                  // just below -2^(W-1)
        check(mk(0, W - 2, mask(M)), 1'(s));            // largest below 2^(W-1)
        check(mk(0, W - 1, mask(M)), 1'(s));            // largest below 2^W
        check(mk(0, W, 0), 1'(s));                      // 2^W
        check(mk(0, M, 7), 1'(s));                      // exact integer
        check(mk(1, M + 2, 7), 1'(s));
        check(inf(E, M, 0), 1'(s));
        check(inf(E, M, 1), 1'(s));
        check(qnan(E, M), 1'(s));
        check(3, 1'(s));                                // denormal
        check(word_t'(1) << (E + M), 1'(s));            // -0
      end
      for (int i = 0; i < NRAND; i++) begin
        x = rand_fp(E, M, i[0], BIAS + W / 2);
        if (i % 4 == 1) x = mk(1'($urandom), int'($urandom_range(W + 1)) - 1, {$urandom, $urandom});
        check(x, 1'($urandom));
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
