// fft_pe_pkg: types and constants shared by the processing element of the
// 2-D systolic FFT array.
//
// Data and twiddle coefficients are 8-bit fixed-point fractions in two's
// complement (one sign bit, seven fraction bits), as in the fabricated chip.
// A complex word is carried as two 8-bit words, real then imaginary, over
// the 8-bit bit-parallel links between neighbouring PEs.
//
// The control input of the chip is 17 bits wide (pe_ctrl_t). The document
// gives its width but not its fields; the field list below is this design's
// own: one field per register load, multiplexer select and sequence start
// that the block diagram names or needs.
package fft_pe_pkg;

  // Word length of data and coefficients.
  localparam int unsigned DW = 8;

  // Clock cycles of one half-butterfly (HBA): 1 scaling + 8 distributed
  // arithmetic steps + 1 final add.
  localparam int unsigned HBA_CYCLES = 10;

  // External control word of the PE (17 bits).
  typedef struct packed {
    logic go;        // start a 10-cycle HBA (GO/NOGO)
    logic op_minus;  // operator '&' of Eq. (1): 0 = HBA+, 1 = HBA-
    logic n_horiz;   // N/W DRU first mux: 0 = NI, 1 = WI
    logic n_res;     // N/W DRU second mux: 1 = own HBA result
    logic n_ld;      // N/W DRU register load
    logic s_horiz;   // S/E DRU first mux: 0 = SI, 1 = EI
    logic s_res;     // S/E DRU second mux: 1 = own HBA result
    logic s_ld;      // S/E DRU register load
    logic lar;       // load Ar from N/W DRU
    logic lai;       // load Ai from N/W DRU
    logic lbr;       // load Br from S/E DRU
    logic lbi;       // load Bi from S/E DRU
    logic lkr;       // load Kr from N/W DRU
    logic lki;       // load Ki from N/W DRU
    logic ildr;      // initial load of real accumulator from N/W DRU
    logic ildi;      // initial load of imaginary accumulator from N/W DRU
    logic qsf;       // accumulator sent to the DRUs: 0 = real, 1 = imaginary
  } pe_ctrl_t;

  // Internally generated HBAU control of one clock cycle (names follow the
  // signal names of the HBAU block diagram).
  typedef struct packed {
    logic scale;     // data scaling step (LAR/LAI pulse, B shifted right)
    logic da;        // distributed-arithmetic step: shift B, accumulate
    logic in;        // IN: first DA step, offset coefficient enters adder
    logic shs;       // SHS: accumulator fed back shifted right one bit
    logic sct;       // SCT: last DA step (sign bit), coefficient sign reversed
    logic m1;        // M1: final '&' step, Ar/Ai enters adder
    logic lx;        // LXR/LXI: accumulators take the adder output
    logic op_minus;  // operator '&' latched for this HBA
  } hba_ctrl_t;

endpackage
