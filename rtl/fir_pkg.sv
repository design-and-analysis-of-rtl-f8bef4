// fir_pkg: types and constants shared by the reconfigurable BSS FIR filter.
//
// The filter multiplies each input sample by a coefficient without a
// multiplier: the coefficient is recoded into short signed digits, each digit
// picks a precomputed multiple of the sample, and a small tree of add/subtract
// units sums the shifted multiples. Two digit sizes exist (4-bit and 3-bit
// digits) and two adder styles can be used for every add/subtract unit
// (a pipelined carry look-ahead adder and a pipelined carry-select adder).
//
// The 33-bit adder width comes from the adder structures of the design; the
// 16-bit sample and coefficient widths are this implementation's choice.
package fir_pkg;

  // Adder style used inside every add/subtract unit of a processing element.
  typedef enum logic {
    ADDER_CSLA = 1'b0,  // pipelined carry-select adder (default)
    ADDER_CLA  = 1'b1   // pipelined carry look-ahead adder
  } adder_kind_e;

  // Width of every adder in the processing elements and in the delay chain.
  localparam int unsigned ADD_W = 33;
  // Bits handled by one pipelined adder stage.
  localparam int unsigned ADD_GROUP = 4;
  // Latency of a pipelined adder: one cycle per 4-bit stage.
  localparam int unsigned ADD_LAT = (ADD_W - 1) / ADD_GROUP;

  // Default sample and coefficient widths.
  localparam int unsigned X_W = 16;
  localparam int unsigned H_W = 16;

  // Number of signed digits a H_W-bit coefficient is recoded into, for
  // D-bit digits: D-bit groups for all but the top digit, and one more
  // digit that holds the remaining top bits together with the sign.
  function automatic int unsigned num_digits(int unsigned d, int unsigned hw);
    return (hw - 1) / d + 1;
  endfunction

endpackage
