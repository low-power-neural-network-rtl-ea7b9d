// gmdh_pkg: types and constants shared by the GMDH network datapath, the
// trainer and the evaluator.
//
// Numbers are two's complement fixed point: DATA_W bits with FRAC fractional
// bits (Q7.8 by default). A neuron has N_TERMS = 6 terms, indexed as in
// equation (1): 0 = constant, 1 = in1, 2 = in2, 3 = in1^2, 4 = in2^2,
// 5 = in1*in2. The number format and widths are choices of this design; the
// term set and its order are the algorithm's.
package gmdh_pkg;

  localparam int unsigned DATA_W  = 16;  // data and coefficient width
  localparam int unsigned FRAC    = 8;   // fractional bits of data/coefficients
  localparam int unsigned N_TERMS = 6;   // terms of the quadratic neuron
  localparam int unsigned SEL_W   = 8;   // width of an input-select index

  typedef logic signed [DATA_W-1:0] data_t;
  typedef data_t coef_t [N_TERMS];

  // One trained neuron: which two outputs of the previous layer feed it and
  // its six coefficients b0..b5 (a removed term has a zero coefficient).
  typedef struct packed {
    logic                   valid;
    logic [SEL_W-1:0]       sel1;
    logic [SEL_W-1:0]       sel2;
    logic [N_TERMS-1:0][DATA_W-1:0] coef;
  } neuron_cfg_t;
  // Why training stopped.
  typedef enum logic [2:0] {
    STOP_NONE      = 3'd0,  // not run yet
    STOP_SINGLE    = 3'd1,  // the last layer added has one neuron
    STOP_LIMIT     = 3'd2,  // the layer limit was reached
    STOP_NO_GAIN   = 3'd3,  // a new layer did not lower the average error
    STOP_NO_NEURON = 3'd4   // no neuron could be formed for a new layer
  } stop_t;
endpackage
