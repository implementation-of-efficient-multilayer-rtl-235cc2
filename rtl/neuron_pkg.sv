// neuron_pkg: constants shared by the neuron blocks.
//
// The data width (32 bits) and the number of inputs per neuron (3) are the
// values of the reference MAC description. The Taylor order 40 and the input
// range of +/-20 for the activation are the values at which the tan-sigmoid
// approximation was found to match the true function. The fixed-point formats
// of the activation unit are this design's own choice.
package neuron_pkg;

  // Basic functional units
  parameter int unsigned DATA_W    = 32;  // width of one input and one weight
  parameter int unsigned N_INPUTS  = 3;   // inputs (and weights) per neuron

  // Tan-sigmoid activation
  parameter int unsigned TAYLOR_K  = 40;  // highest power kept in each series
  parameter int unsigned X_MAX     = 20;  // activation argument is clamped to +/-X_MAX
  parameter int unsigned X_FRAC    = 24;  // fractional bits of the internal argument
  parameter int unsigned ACC_W     = 64;  // width of the series accumulators
  parameter int unsigned ACC_FRAC  = 30;  // fractional bits of the series accumulators
  parameter int unsigned RECIP_FRAC = 32; // fractional bits of the 1/n constants
  parameter int unsigned ACT_W     = 16;  // width of the activation output
  parameter int unsigned ACT_FRAC  = 14;  // fractional bits of the activation output

endpackage
