// Self-checking testbench of the integer-to-float converter.
//
// Runs single precision with a 32-bit integer, half precision with a 16-bit
// integer (where large unsigned values overflow to infinity) and the
// reduced format E=5/M=12 with an 18-bit integer, each in signed and
// unsigned mode. Directed cases cover 0, +-1, the most negative integer,
// all-ones, and values that need rounding (ties to even); random integers
// of random bit length cover the rest. fpu_ref_pkg rounds the exact double
// value of the integer to give the expected result.
module tb_fpu_i2f;
  import fpu_pkg::*;
  import fpu_ref_pkg::*;

  localparam int NF = 3;
  localparam int FE [NF] = '{8, 5, 5};
  localparam int FM [NF] = '{23, 10, 12};
  localparam int NRAND = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done = 0;

  for (genvar g = 0; g < NF; g++) begin : g_fmt
    localparam int E = FE[g];
    localparam int M = FM[g];
    localparam int W = 1 + E + M;

    logic [W-1:0] x, r;
    logic         sgn;
    fpu_status_t  fl;

    fpu_i2f #(.E(E), .M(M), .IW(W)) dut (.x(x), .int_signed(sgn), .result(r), .flags(fl));

    task automatic check(word_t v, bit s);
      word_t er;
      logic [3:0] ef;
      x = W'(v); sgn = s;
      @(posedge clk);
      ref_i2f(v & mask(W), s, E, M, W, er, ef);
      checks++;
      if (word_t'(r) != er || fl != ef) begin
        failures++;
        if (failures < 20)
          $display("FAIL i2f E=%0d M=%0d x=%h signed=%0d: got %h/%b exp %h/%b",
                   E, M, v, s, r, fl, er, ef);
      end
    endtask

    initial begin
      word_t v;
      for (int s = 0; s < 2; s++) begin
        check(0, 1'(s));
        check(1, 1'(s));
        check(mask(W), 1'(s));                          // -1 or 2^W-1
        check(word_t'(1) << (W - 1), 1'(s));            // most negative
        check((word_t'(1) << (M + 1)) + 1, 1'(s));      // tie, rounds to even
        check((word_t'(1) << (M + 1)) + 3, 1'(s));      // tie, rounds up
        check((word_t'(1) << (M + 2)) + 3, 1'(s));      // above half
        check(mask(W - 1), 1'(s));
      end
      for (int i = 0; i < NRAND; i++) begin
        v = {$urandom, $urandom} & mask(1 + int'($urandom_range(W - 1)));
        if (i[0]) v = ~v;
        check(v, 1'($urandom));
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
