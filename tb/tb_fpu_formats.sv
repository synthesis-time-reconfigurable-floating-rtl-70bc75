// Format-sweep testbench: the unit built for every format of the evaluated
// set, from IEEE half precision to IEEE double precision.
//
//   E  M   bits            E  M   bits
//   5  10  16 (half)       7  16  24
//   6  11  18              6  17  24
//   5  12  18              8  23  32 (single)
//   6  13  20             10  37  48
//   5  14  20              9  38  48
//                         11  52  64 (double)
//
// Each format gets its own fpu_core instance and runs random add, subtract,
// multiply and both conversions, with fully random operands and integers,
// exceptions enabled. Results are checked against the exact big-integer
// reference of fpu_ref_pkg, which covers every format up to double
// precision. For the formats with M <= 25 the double-based reference is run
// too and must agree, so the two models check each other.
module tb_fpu_formats;
  import fpu_pkg::*;
  import fpu_ref_pkg::*;

  localparam int NF = 11;
  localparam int FE [NF] = '{5, 6, 5, 6, 5, 7, 6, 8, 10, 9, 11};
  localparam int FM [NF] = '{10, 11, 12, 13, 14, 16, 17, 23, 37, 38, 52};
  localparam int NRAND = 6000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done = 0;

  for (genvar g = 0; g < NF; g++) begin : g_fmt
    localparam int E = FE[g];
    localparam int M = FM[g];
    localparam int W = 1 + E + M;
    localparam int BIAS = (1 << (E - 1)) - 1;
    localparam bit WIDE = (M > 25);

    logic [W-1:0] a, b, result;
    logic [2:0]   operation;
    fpu_ctrl_t    control;
    fpu_status_t  status;

    fpu_core #(.E(E), .M(M)) dut (
      .a(a), .b(b), .operation(operation), .control(control),
      .result(result), .status(status)
    );

    initial begin
      word_t x, y, er, er2;
      logic [3:0] ef, ef2;
      logic [2:0] op;
      bit sgn;
      for (int i = 0; i < NRAND; i++) begin
        op  = 3'($urandom_range(4));
        sgn = 1'($urandom);
        x = rand_fp(E, M, 1'b0, 0);
        y = rand_fp(E, M, i[1], (op == OP_MUL) ? 2 * BIAS - f_exp(x, E, M) : f_exp(x, E, M));
        if (op == OP_F2I && i[1]) x = rand_fp(E, M, 1'b1, BIAS + int'($urandom_range(W + 1)));
        if (op == OP_I2F) x = {$urandom, $urandom} & mask(1 + int'($urandom_range(W - 1)));
        a = W'(x); b = W'(y); operation = op;
        control.int_signed = sgn; control.exc_en = 1'b1;
        @(posedge clk);
        case (op)
          OP_ADD:  ref_add_x(x, y, 1'b0, E, M, er, ef);
          OP_SUB:  ref_add_x(x, y, 1'b1, E, M, er, ef);
          OP_MUL:  ref_mul_x(x, y, E, M, er, ef);
          OP_F2I:  ref_f2i(x, sgn, E, M, W, er, ef);   // exact in double for all formats
          default: ref_i2f_x(x, sgn, E, M, W, er, ef);
        endcase
        if (!WIDE) begin
          case (op)
            OP_ADD:  ref_add(x, y, 1'b0, E, M, er2, ef2);
            OP_SUB:  ref_add(x, y, 1'b1, E, M, er2, ef2);
            OP_MUL:  ref_mul(x, y, E, M, er2, ef2);
            OP_F2I:  ref_f2i(x, sgn, E, M, W, er2, ef2);
            default: ref_i2f(x, sgn, E, M, W, er2, ef2);
          endcase
          checks++;
          if (er2 != er || ef2 != ef) begin
            failures++;
            if (failures < 20)
              $display("FAIL models disagree E=%0d M=%0d op=%0d a=%h b=%h", E, M, op, x, y);
          end
        end
        checks++;
        if (word_t'(result) != er || status != ef) begin
          failures++;
          if (failures < 20)
            $display("FAIL formats E=%0d M=%0d op=%0d a=%h b=%h signed=%0d: got %h/%b exp %h/%b",
                     E, M, op, x, y, sgn, result, status, er, ef);
        end
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
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
