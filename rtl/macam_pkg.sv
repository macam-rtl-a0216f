// macam_pkg: sizes and types shared by the MACAM accelerator RTL.
//
// The structural numbers (10 PEs, 64 arrays per PE, a 128x128 crossbar split
// into four 64x64 regions, 64 bit-slices) follow the accelerator's description.
// The numeric widths (vector mantissa, exponent, delay window, ADC precisions,
// buffer depths) are this design's own choices and are marked as such.
package macam_pkg;

  // ---- structure -----------------------------------------------------------
  localparam int NUM_PE     = 10;   // PEs in the accelerator
  localparam int NUM_ARRAYS = 64;   // multifunctional arrays per PE (= bit-slices)
  localparam int XBAR_DIM   = 128;  // crossbar rows/columns
  localparam int NUM_SUB    = 4;    // regions (sub-arrays) per crossbar
  localparam int SUB_DIM    = 64;   // rows/columns of one region

  // ---- numeric format (own choices) ----------------------------------------
  localparam int XW        = 64;    // vector mantissa bits, two's complement
  localparam int EXP_W     = 16;    // signed, unbiased exponent
  localparam int DLY_W     = 7;     // delay-register entry (delay or row count)
  localparam int DMAX      = 64;    // longest delay applied to a row input
  localparam int DENSE_ADC = 7;     // dense-mode ADC precision
  localparam int SPARSE_ADC= 5;     // sparse-mode ADC precision
  localparam int ROW_W     = 32;    // output row id
  localparam int VBUF_DEPTH= 256;   // vector elements held by a PE
  localparam int MQ_DEPTH  = 16;    // merge-queue entries
  localparam int RES_W     = 256;   // merged mantissa bits

  // Mode of one sub-array position of a PE.
  typedef enum logic [1:0] {
    SUB_IDLE   = 2'd0,   // empty block: skipped
    SUB_DENSE  = 2'd1,   // MAC region holding a dense 64x64 block
    SUB_SPMAC  = 2'd2,   // MAC region holding values of the sparse region
    SUB_CAM    = 2'd3    // CAM region holding MCSR column indexes
  } sub_mode_e;

  // Host write commands.
  typedef enum logic [2:0] {
    WR_CFG    = 3'd0,    // configuration register
    WR_VEC    = 3'd1,    // vector element into the input buffer
    WR_DENSE  = 3'd2,    // one dense matrix element (mantissa)
    WR_DEXP   = 3'd3,    // exponent of one dense column
    WR_SPARSE = 3'd4     // one MCSR entry: index, value, exponent, row count
  } wr_kind_e;

  // Controller stages.
  typedef enum logic [3:0] {
    ST_IDLE, ST_GATHER, ST_DSEL, ST_DSETUP, ST_DRUN, ST_DOUT,
    ST_SSEL, ST_SROW, ST_SSETUP, ST_SRUN, ST_SOUT, ST_FLUSH, ST_DONE
  } stage_e;

  // Number of bits needed to count 0..n.
  function automatic int cntw(input int n);
    return $clog2(n + 1);
  endfunction

endpackage
