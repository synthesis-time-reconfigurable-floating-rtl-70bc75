// Shared types of the reconfigurable floating-point unit.
//
// The unit's format (E exponent bits, M mantissa bits, one sign bit) is set
// by module parameters, so only the format-independent encodings live here:
// the operation code, the control word and the status word.
//
// The five operations are the ones the unit is specified to perform (sum,
// subtraction, multiplication, float-to-integer and integer-to-float). The
// numeric codes, the bit order of the control and status words and the
// choice of a 3-bit operation field are this design's own.
package fpu_pkg;

  // Operation selector on the unit's 'operation' port.
  typedef enum logic [2:0] {
    OP_ADD = 3'd0,   // result = a + b
    OP_SUB = 3'd1,   // result = a - b
    OP_MUL = 3'd2,   // result = a * b
    OP_F2I = 3'd3,   // result = integer(a), truncated toward zero
    OP_I2F = 3'd4    // result = float(a), a read as an integer
  } fpu_op_e;

  // Control word: configures the unit for the current operation.
  typedef struct packed {
    logic exc_en;      // 1: exception flags are driven on 'status'; 0: status reads 0
    logic int_signed;  // 1: the integer of OP_I2F / OP_F2I is two's complement; 0: unsigned
  } fpu_ctrl_t;

  // Status word: one flag per supported exception.
  typedef struct packed {
    logic invalid;     // invalid operation, result is the canonical NaN
    logic overflow;    // result too large, replaced by infinity
    logic underflow;   // result too small for a normal number, replaced by zero
    logic inexact;     // result differs from the exact value
  } fpu_status_t;

  localparam fpu_status_t STATUS_NONE = '{default: 1'b0};

endpackage
