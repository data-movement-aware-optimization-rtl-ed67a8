// oa_pkg: types and constants shared by the OnlineAttention datapath and the
// Gemmini-style memories around it.
//
// Geometry follows the configuration described for the accelerator: a 16x16
// array (DIM), int8 scratchpad elements, int32 accumulator elements, a
// scratchpad of 4 banks x 4096 rows and an accumulator of 2048 rows. The
// RoCC function number 23 selects the OnlineAttention engine; 24 is kept
// reserved. The sub-operation encoding inside rs1/rs2 is this design's own
// choice (see online_attention.sv for the bit layout).
package oa_pkg;

  localparam int unsigned DIM         = 16;    // systolic array edge / lanes per chunk
  localparam int unsigned IN_W        = 8;     // scratchpad element width (int8)
  localparam int unsigned ACC_W       = 32;    // accumulator element width (int32)
  localparam int unsigned SP_BANKS    = 4;
  localparam int unsigned SP_ROWS     = 4096;  // rows per scratchpad bank
  localparam int unsigned ACC_ROWS    = 2048;
  localparam int unsigned SP_ADDR_W   = $clog2(SP_BANKS * SP_ROWS); // 14
  localparam int unsigned ACC_ADDR_W  = $clog2(ACC_ROWS);           // 11

  localparam logic [6:0] FUNCT_ONLINE_ATTN = 7'd23;
  localparam logic [6:0] FUNCT_MACRO_SEQ   = 7'd24; // reserved, not implemented

  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic signed [IN_W-1:0]  elem_t;
  typedef acc_t  [DIM-1:0] acc_row_t;   // one accumulator row: DIM int32 lanes
  typedef elem_t [DIM-1:0] sp_row_t;    // one scratchpad row: DIM int8 lanes

  // OnlineAttention sub-operations, carried in rs1[2:0].
  typedef enum logic [2:0] {
    OP_CONFIG        = 3'd0,
    OP_BATCH_UPDATE  = 3'd1,
    OP_BATCH_WEIGHTS = 3'd2,
    OP_FUSED_BATCH   = 3'd3
  } oa_op_e;

  // iexp coefficient slots written by OP_CONFIG (rs1[9:8]).
  typedef enum logic [1:0] {
    CFG_QLN2     = 2'd0,
    CFG_QLN2_INV = 2'd1,
    CFG_QB       = 2'd2,
    CFG_QC       = 2'd3
  } oa_cfg_e;

  // iexp coefficients (I-BERT second-order polynomial form).
  typedef struct packed {
    logic signed [31:0] qln2;      // round(ln2 / S)
    logic signed [31:0] qln2_inv;  // round(2^16 / qln2)
    logic signed [31:0] qb;        // round(b / S)
    logic signed [31:0] qc;        // round(c / (a S^2))
  } iexp_cfg_t;

  // RoCC command as seen by the accelerator.
  typedef struct packed {
    logic [6:0]  funct;
    logic [63:0] rs1;
    logic [63:0] rs2;
  } rocc_cmd_t;

  // Accumulator access from a client (executor or OnlineAttention).
  typedef struct packed {
    logic                  wen;     // 1: write, 0: read
    logic [ACC_ADDR_W-1:0] addr;
    logic                  acc;     // write: add to the stored row instead of overwriting
    logic                  raw;     // read: return int32 row without scale/ReLU
    logic                  relu;    // read (not raw): apply ReLU before narrowing
    logic [31:0]           scale;   // read (not raw): unsigned Q16.16 multiplier
    acc_row_t              wdata;
  } acc_req_t;

  typedef struct packed {
    acc_row_t raw;      // int32 row (raw read)
    sp_row_t  narrow;   // scaled, optionally ReLU'd, saturated int8 row
  } acc_resp_t;

  // Scratchpad write request.
  typedef struct packed {
    logic [SP_ADDR_W-1:0] addr;
    logic [DIM-1:0]       mask;    // byte enables
    sp_row_t              data;
  } sp_wreq_t;

  // One DIMxDIM tile matmul for the executor: C(c_addr) (+)= A(a_addr) x B(b_addr),
  // with B taken transposed (rows of K loaded as columns) when transpose_b is set.
  typedef struct packed {
    logic [SP_ADDR_W-1:0]  a_addr;
    logic [SP_ADDR_W-1:0]  b_addr;
    logic [ACC_ADDR_W-1:0] c_addr;
    logic                  accumulate;
    logic                  transpose_b;
  } exe_cmd_t;

  // Tile layout used for both the QK^T score block in the accumulator and the
  // int8 weight block in the scratchpad: DIMxDIM tiles, tile (i, c) at
  // base + (i * n_chunks + c) * DIM, one matrix row per memory row.
  function automatic logic [31:0] tile_row_addr(input logic [31:0] base,
                                                input logic [31:0] row,
                                                input logic [31:0] chunk,
                                                input logic [31:0] n_chunks);
    return base + (((row / DIM) * n_chunks + chunk) * DIM) + (row % DIM);
  endfunction

endpackage
