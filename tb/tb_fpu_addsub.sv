// Self-checking testbench of the adder/subtractor.
//
// Runs three formats side by side (single precision E=8/M=23, half precision
// E=5/M=10 and the reduced format E=6/M=11). Each gets directed cases
// (rounding ties, exact cancellation, signed zeros, overflow, underflow,
// infinities, NaNs, denormal inputs) and random operands, half of them with
// nearby exponents to exercise cancellation and long normalisation shifts.
// Results and all four flags are compared with the double-precision
// reference model of fpu_ref_pkg. The unit is combinational: outputs are
// checked one clock period after the inputs change.
module tb_fpu_addsub;
  import fpu_pkg::*;
  import fpu_ref_pkg::*;

  localparam int NF = 3;
  localparam int FE [NF] = '{8, 5, 6};
  localparam int FM [NF] = '{23, 10, 11};
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
    logic         sub;
    fpu_status_t  fl;

    fpu_addsub #(.E(E), .M(M)) dut (.a(a), .b(b), .sub(sub), .result(r), .flags(fl));

    function automatic word_t mk(bit s, int ue, word_t man);
      return (word_t'(s) << (E + M)) | (word_t'(64'(ue) + 64'(BIAS)) << M) | (man & mask(M));
    endfunction

    task automatic check(word_t x, word_t y, bit s);
      word_t er;
      logic [3:0] ef;
      a = W'(x); b = W'(y); sub = s;
      @(posedge clk);
      ref_add(x, y, s, E, M, er, ef);
      checks++;
      if (word_t'(r) != er || fl != ef) begin
        failures++;
        if (failures < 20)
          $display("FAIL addsub E=%0d M=%0d a=%h b=%h sub=%0d: got %h/%b exp %h/%b",
                   E, M, x, y, s, r, fl, er, ef);
      end
    endtask

    initial begin
      word_t x, y;
      // ties: 1 + 2^-(M+1) rounds to even (down), (1+ulp) + 2^-(M+1) rounds up
      check(mk(0, 0, 0), mk(0, -(M + 1), 0), 1'b0);
      check(mk(0, 0, 1), mk(0, -(M + 1), 0), 1'b0);
      check(mk(0, 0, 0), mk(0, 0, 0), 1'b0);               // 1 + 1
      check(mk(0, 0, 5), mk(0, 0, 5), 1'b1);               // x - x = +0
      check(mk(1, 3, 7), mk(1, 3, 7), 1'b1);               // -x - -x = +0
      check(word_t'(1) << (E + M), word_t'(1) << (E + M), 1'b0);   // -0 + -0
      check(word_t'(1) << (E + M), 0, 1'b0);               // -0 + +0
      check(mk(0, BIAS, mask(M)), mk(0, BIAS, mask(M)), 1'b0);   // overflow
      check(mk(0, 1 - BIAS, 1), mk(0, 1 - BIAS, 0), 1'b1);  // underflow
      check(mk(0, 1 - BIAS, 3), mk(1, 1 - BIAS, 0), 1'b0);  // underflow
      check(inf(E, M, 0), inf(E, M, 1), 1'b0);             // inf - inf
      check(inf(E, M, 0), inf(E, M, 0), 1'b1);             // inf - inf
      check(inf(E, M, 1), mk(0, 2, 3), 1'b0);
      check(mk(0, 2, 3), inf(E, M, 0), 1'b1);
      check(qnan(E, M), mk(0, 0, 0), 1'b0);
      check(mk(0, 0, 0), qnan(E, M) & ~(word_t'(1) << (M - 1)) | 1, 1'b0);  // sNaN
      check(mk(0, 4, 9), 5, 1'b0);                          // denormal b
      check(3, mk(1, 4, 9), 1'b1);                          // denormal a
      check(mk(0, 0, 0), mk(0, -(M + 3), 1), 1'b1);         // 1 - tiny
      for (int i = 0; i < NRAND; i++) begin
        x = rand_fp(E, M, 1'b0, 0);
        y = rand_fp(E, M, i[0], f_exp(x, E, M));
        check(x, y, 1'($urandom));
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
