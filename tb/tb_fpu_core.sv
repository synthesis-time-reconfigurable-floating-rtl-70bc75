// End-to-end testbench of the floating-point unit at its default format
// (single precision, E=8, M=23, 32-bit integers).
//
// Drives the unit through its external interface only: all five operations,
// both integer modes of the control word, exceptions enabled and disabled,
// and an undefined operation code. Every result and status word is compared
// with the reference model of fpu_ref_pkg. The unit is combinational, so it
// must settle within the cycle in which its inputs were applied: outputs
// are sampled at the next clock edge.
//
// Each mechanism of the unit is counted and a failure is recorded for any
// that never happened: every operation, each of the four exceptions, a
// denormal input flushed to zero, a NaN result, the status port masked by
// the control word, signed and unsigned conversions, an undefined opcode.
module tb_fpu_core;
  import fpu_pkg::*;
  import fpu_ref_pkg::*;

  localparam int E = 8;
  localparam int M = 23;
  localparam int W = 32;
  localparam int NRAND = 50000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] a, b, result;
  logic [2:0]   operation;
  fpu_ctrl_t    control;
  fpu_status_t  status;

  fpu_core dut (
    .a(a), .b(b), .operation(operation), .control(control),
    .result(result), .status(status)
  );

  int checks = 0, failures = 0;

  typedef enum int {
    EV_ADD, EV_SUB, EV_MUL, EV_F2I, EV_I2F,
    EV_INEXACT, EV_INVALID, EV_OVERFLOW, EV_UNDERFLOW,
    EV_DENORMAL, EV_NAN_OUT, EV_MASKED, EV_SIGNED, EV_UNSIGNED, EV_BADOP,
    EV_N
  } event_e;
  int events [EV_N];
  localparam string EV_NAME [EV_N] = '{
    "add", "sub", "mul", "f2i", "i2f", "inexact", "invalid", "overflow",
    "underflow", "denormal input", "NaN result", "status masked",
    "signed conversion", "unsigned conversion", "undefined opcode"};

  task automatic apply(logic [2:0] op, word_t x, word_t y, bit sgn, bit en);
    word_t er;
    logic [3:0] ef;
    a = W'(x); b = W'(y); operation = op;
    control.int_signed = sgn; control.exc_en = en;
    @(posedge clk);
    er = '0; ef = 4'b1000;
    case (op)
      OP_ADD: ref_add(x, y, 1'b0, E, M, er, ef);
      OP_SUB: ref_add(x, y, 1'b1, E, M, er, ef);
      OP_MUL: ref_mul(x, y, E, M, er, ef);
      OP_F2I: ref_f2i(x, sgn, E, M, W, er, ef);
      OP_I2F: ref_i2f(x, sgn, E, M, W, er, ef);
      default: ;
    endcase
    if (op <= 3'd4) events[op]++; else events[EV_BADOP]++;
    if (ef[0]) events[EV_INEXACT]++;
    if (ef[3]) events[EV_INVALID]++;
    if (ef[2]) events[EV_OVERFLOW]++;
    if (ef[1]) events[EV_UNDERFLOW]++;
    if (!en && ef != 0) events[EV_MASKED]++;
    if (op == OP_F2I || op == OP_I2F) begin
      if (sgn) events[EV_SIGNED]++; else events[EV_UNSIGNED]++;
    end
    if (op != OP_I2F && ((f_exp(x, E, M) == 0 && f_man(x, E, M) != 0) ||
        (op != OP_F2I && f_exp(y, E, M) == 0 && f_man(y, E, M) != 0)))
      events[EV_DENORMAL]++;
    if (op != OP_F2I && is_nan(er, E, M)) events[EV_NAN_OUT]++;
    if (!en) ef = 4'b0000;
    checks++;
    if (word_t'(result) != er || status != ef) begin
      failures++;
      if (failures < 20)
        $display("FAIL core op=%0d a=%h b=%h ctrl=%b: got %h/%b exp %h/%b",
                 op, x, y, control, result, status, er, ef);
    end
  endtask

  initial begin
    word_t x, y;
    logic [2:0] op;
    // A short directed sequence through every operation.
    apply(OP_ADD, 32'h3fc00000, 32'h40100000, 1'b0, 1'b1);   // 1.5 + 2.25
    apply(OP_SUB, 32'h3fc00000, 32'h40100000, 1'b0, 1'b1);   // 1.5 - 2.25
    apply(OP_MUL, 32'h3fc00000, 32'hc0100000, 1'b0, 1'b1);   // 1.5 * -2.25
    apply(OP_F2I, 32'hc0700000, 32'h0, 1'b1, 1'b1);          // int(-3.75)
    apply(OP_I2F, 32'hfffffff9, 32'h0, 1'b1, 1'b1);          // float(-7)
    apply(OP_I2F, 32'hfffffff9, 32'h0, 1'b0, 1'b1);          // float(4294967289)
    apply(OP_MUL, 32'h7f000000, 32'h7f000000, 1'b0, 1'b1);   // overflow
    apply(OP_MUL, 32'h7f000000, 32'h7f000000, 1'b0, 1'b0);   // overflow, masked
    apply(OP_MUL, 32'h00800000, 32'h3f000000, 1'b0, 1'b1);   // underflow
    apply(OP_ADD, 32'h7f800000, 32'hff800000, 1'b0, 1'b1);   // invalid
    apply(OP_ADD, 32'h00000123, 32'h3f800000, 1'b0, 1'b1);   // denormal input
    apply(OP_F2I, 32'h4f800000, 32'h0, 1'b1, 1'b1);          // 2^32 does not fit
    apply(3'd5, 32'h3f800000, 32'h3f800000, 1'b0, 1'b1);     // undefined opcode
    apply(3'd7, 32'h3f800000, 32'h3f800000, 1'b0, 1'b0);
    for (int i = 0; i < NRAND; i++) begin
      op = 3'($urandom_range(4));
      if (i % 200 == 7) op = 3'($urandom_range(7, 5));
      x = rand_fp(E, M, 1'b0, 0);
      case (op)
        OP_MUL:  y = rand_fp(E, M, i[1], 253 - f_exp(x, E, M));
        OP_F2I:  if (i[1]) x = rand_fp(E, M, 1'b1, 127 + int'($urandom_range(33)));
        OP_I2F:  x = {$urandom, $urandom} & mask(1 + int'($urandom_range(31)));
        default: y = rand_fp(E, M, i[1], f_exp(x, E, M));
      endcase
      apply(op, x, y, 1'($urandom), ($urandom_range(9) != 0));
    end
    for (int k = 0; k < EV_N; k++) begin
      $display("  %-20s %0d", EV_NAME[k], events[k]);
      if (events[k] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", EV_NAME[k]);
      end
    end
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
