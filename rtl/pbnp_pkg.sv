// pbnp_pkg: shared constants and helper functions of the path-based neural
// branch predictor (PBNP) with modulo path-history and bias-based filtering.
//
// The defaults describe the 32 KB configuration: a global branch history of
// h = 42 outcomes, a path history of P = 3 branch addresses (so three weight
// tables plus one bias table) and 16K five-bit bias weights, all as listed for
// that size. The weight width (8 bits), the number of rows per weight table
// (512), the checkpoint depth (32) and the training threshold are this
// design's own choices.
//
// Numbering used throughout: weight w_i (i = 1..h) multiplies x_i, the outcome
// of the i-th most recent branch. w_i lives in table t = ((i-1) mod P) + 1,
// so table t holds w_t, w_{t+P}, w_{t+2P}, ... ("slot" m holds w_{t+mP}).
// Table P is indexed by the address of the branch being predicted; table t < P
// by the address of the branch t positions earlier in the path.
package pbnp_pkg;

  parameter int unsigned PC_W         = 32;     // branch address width
  parameter int unsigned PC_LSB       = 2;      // address bits below this are dropped (4-byte instructions)
  parameter int unsigned HIST_LEN     = 42;     // h, global branch history length
  parameter int unsigned PATH_LEN     = 3;      // P, path history length = number of weight tables
  parameter int unsigned WEIGHT_W     = 8;      // width of a correlating weight
  parameter int unsigned BIAS_W       = 5;      // width of a bias weight
  parameter int unsigned ROWS         = 512;    // rows per weight table
  parameter int unsigned BIAS_ENTRIES = 16384;  // bias weights
  parameter int unsigned CKPT_ENTRIES = 32;     // in-flight branches (checkpoints)
  parameter int unsigned SUM_W        = 16;     // width of partial sums and of the dot product

  // Weights held by each table row: ceil(h / P).
  function automatic int unsigned weights_per_row(int unsigned h, int unsigned p);
    return (h + p - 1) / p;
  endfunction

  // Training threshold of the path-based neural predictor: floor(2.14(h+1) + 20.58).
  function automatic int unsigned train_threshold(int unsigned h);
    return (214 * (h + 1) + 2058) / 100;
  endfunction

endpackage
