// rts_pkg: number format, configuration records and shared helpers of the
// real-time network solver.
//
// All network quantities (voltages, currents, conductances, entries of the
// solution matrix H) are signed fixed-point numbers of DW bits with FW
// fraction bits. The format is this design's choice: 64 bits with 32 fraction
// bits cover line voltages of several hundred kV and conductances down to a
// few micro-siemens. A product is truncated (arithmetic shift) back to the
// same format.
//
// Indices into the solution vector x and into the injection vector b share one
// index type. The index IDX_NONE stands for the ground node: it reads as zero
// and takes no injection.
package rts_pkg;

  localparam int DW = 64;              // word width of every network quantity
  localparam int FW = 32;              // fraction bits
  typedef logic signed [DW-1:0] fx_t;

  localparam int IDXW = 8;             // index width, networks up to 255 variables
  typedef logic [IDXW-1:0] idx_t;
  localparam idx_t IDX_NONE = '1;

  localparam int ADC_BITS = 16;        // converter word
  localparam int DAC_BITS = 16;
  localparam int DLYW = 16;            // width of a line delay in steps

  // fixed-point product, truncated to the common format
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*DW-1:0] p;
    p = a * b;
    return fx_t'(p >>> FW);
  endfunction

  // backward-Euler companion kinds of a lumped element
  typedef enum logic {LUMP_L = 1'b0, LUMP_C = 1'b1} lump_kind_e;

  // lumped L or C between x nodes p and q; its history source is injected
  // into b rows p and q (rows of node equations share the node's index)
  typedef struct packed {
    lump_kind_e kind;
    idx_t       p;
    idx_t       q;
    fx_t        g;      // dt/L or C/dt
  } lump_cfg_t;

  // FAMNM switch between x nodes p and q, fixed conductance gs
  typedef struct packed {
    idx_t p;
    idx_t q;
    fx_t  gs;
  } sw_cfg_t;

  // one propagation mode of a line, ends k and m
  typedef struct packed {
    idx_t            vk;      // x index of the modal voltage at end k
    idx_t            vm;      // x index of the modal voltage at end m
    idx_t            bk;      // b row of the modal branch equation at end k
    idx_t            bm;      // b row at end m
    fx_t             g2;      // twice the modal characteristic conductance
    fx_t             k_far;   // weight of the far-end wave (1 for a lossless line)
    fx_t             k_near;  // weight of the near-end wave (0 for a lossless line)
    logic [DLYW-1:0] dly;     // integer part of the travel time in steps, >= 1
    fx_t             frac;    // fraction part of the travel time, 0 <= frac < 1
  } tl_cfg_t;

  // Norton source: injects g * value into b row b
  typedef struct packed {
    idx_t       b;
    logic       from_adc; // value from an analog input, else from the host
    logic [3:0] ch;       // analog input channel
    fx_t        g;        // source conductance
    fx_t        value;    // host value when from_adc is 0
  } src_cfg_t;

endpackage
