// Shared types and constants of the Amber accelerator subsystem.
//
// Holds the CGRA geometry (32 columns x 16 rows, every fourth column a MEM
// column), the routing-track count, the PE opcode list (the INT/BIT and
// BFloat16 operations of the ALU table), the affine streaming-controller
// configuration record, and the 28-bit configuration word carried by the
// configuration network. Tile counts, memory sizes and opcode names follow the
// design description; track counts, encodings and field widths are this
// design's own choices and are marked as such below.
package amber_pkg;

  // ---------------- geometry ----------------
  localparam int unsigned NUM_COLS      = 32;   // 16 GLB tiles x 2 columns (own choice, from 512 tiles / 16 rows)
  localparam int unsigned NUM_ROWS      = 16;   // 384 PE + 128 MEM = 512 tiles
  localparam int unsigned MEM_COL_EVERY = 4;    // every fourth column is memory
  localparam int unsigned NUM_GLB_TILES = 16;
  localparam int unsigned NUM_TRACKS    = 5;    // own choice: tracks per side, per width
  localparam int unsigned WORD_W        = 16;   // INT16 / BFloat16 data path

  // ---------------- affine controllers ----------------
  localparam int unsigned ID_LEVELS = 6;        // 6-level iteration domain
  localparam int unsigned CNT_W     = 16;       // extents, strides, addresses, times

  // One affine controller: iteration domain + address and schedule recurrences.
  // The strides are the recurrence deltas: the amount added to the address
  // (or start time) when level k increments and all lower levels wrap. A
  // compiler derives them from the plain affine strides as
  //   delta_k = s_k - sum_{j<k} s_j * (extent_j - 1).
  typedef struct packed {
    logic [2:0]                            dims;     // active levels, 1..6
    logic [ID_LEVELS-1:0][CNT_W-1:0]       extent;   // iterations per level (>=1)
    logic [CNT_W-1:0]                      addr_off; // AG offset
    logic [ID_LEVELS-1:0][CNT_W-1:0]       addr_dlt; // AG recurrence deltas
    logic [CNT_W-1:0]                      sch_off;  // SG start cycle
    logic [ID_LEVELS-1:0][CNT_W-1:0]       sch_dlt;  // SG recurrence deltas
  } affine_cfg_t;

  // Number of 16-bit configuration registers one affine_cfg_t occupies:
  // 1 (dims) + 6 extents + 1 + 6 + 1 + 6.
  localparam int unsigned AFFINE_REGS = 21;

  // ---------------- configuration network ----------------
  // One configuration word per GLB tile per cycle: 16 lanes x 28 bits = 448
  // bits, the DPR interface width. Field split is this design's choice.
  typedef struct packed {
    logic       col;   // which of the GLB tile's two columns
    logic [3:0] row;   // tile row
    logic [6:0] reg_a; // register inside the tile
    logic [15:0] data;
  } cfg_word_t;        // 28 bits

  typedef struct packed {
    logic       we;
    logic [3:0] row;
    logic [6:0] reg_a;
    logic [15:0] data;
  } cfg_bus_t;         // per-column configuration bus

  // ---------------- PE ALU ----------------
  typedef enum logic [4:0] {
    OP_ADD     = 5'd0,  OP_SUB    = 5'd1,  OP_ADC   = 5'd2,  OP_SBC    = 5'd3,
    OP_ABS     = 5'd4,  OP_GTE    = 5'd5,  OP_LTE   = 5'd6,  OP_SEL    = 5'd7,
    OP_MUL     = 5'd8,  OP_SHR    = 5'd9,  OP_SHL   = 5'd10, OP_OR     = 5'd11,
    OP_AND     = 5'd12, OP_XOR    = 5'd13,
    OP_FADD    = 5'd16, OP_FSUB   = 5'd17, OP_FCMP  = 5'd18, OP_FMUL   = 5'd19,
    OP_GETMAN  = 5'd20, OP_ADDIEXP= 5'd21, OP_SUBEXP= 5'd22, OP_EXP2F  = 5'd23,
    OP_F2INT   = 5'd24, OP_GETFR  = 5'd25, OP_INT2F = 5'd26
  } alu_op_e;

  // Condition codes of the COND unit (own encoding).
  typedef enum logic [3:0] {
    C_Z = 4'd0, C_NZ = 4'd1, C_C = 4'd2, C_NC = 4'd3, C_N = 4'd4, C_NN = 4'd5,
    C_V = 4'd6, C_NV = 4'd7, C_GE = 4'd8, C_LT = 4'd9, C_LUT = 4'd10,
    C_TRUE = 4'd11, C_FALSE = 4'd12
  } cond_e;

  // PE input register modes (REG + mux in front of the ALU).
  typedef enum logic [1:0] {
    IN_BYPASS = 2'd0, IN_DELAY = 2'd1, IN_CONST = 2'd2
  } in_mode_e;

  // MEM tile modes.
  typedef enum logic [1:0] {
    MEM_STREAM = 2'd0, MEM_ROM = 2'd1
  } mem_mode_e;

  // Unpack an affine_cfg_t from 21 consecutive 16-bit registers.
  function automatic affine_cfg_t unpack_affine(input logic [AFFINE_REGS*16-1:0] r);
    affine_cfg_t c;
    c.dims = r[2:0];
    for (int k = 0; k < ID_LEVELS; k++) begin
      c.extent[k]   = r[16*(1+k) +: 16];
      c.addr_dlt[k] = r[16*(8+k) +: 16];
      c.sch_dlt[k]  = r[16*(15+k) +: 16];
    end
    c.addr_off = r[16*7 +: 16];
    c.sch_off  = r[16*14 +: 16];
    return c;
  endfunction

  // Unpack the 14-register form used by the MEM tile, where each controller
  // uses either its address generator or its schedule generator, not both:
  // dims, 6 extents, offset, 6 deltas.
  localparam int unsigned HALF_REGS = 14;
  function automatic affine_cfg_t unpack_half(input logic [HALF_REGS*16-1:0] r,
                                              input logic is_sched);
    affine_cfg_t c;
    c = '0;
    c.dims = r[2:0];
    for (int k = 0; k < ID_LEVELS; k++) begin
      c.extent[k] = r[16*(1+k) +: 16];
      if (is_sched) c.sch_dlt[k]  = r[16*(8+k) +: 16];
      else          c.addr_dlt[k] = r[16*(8+k) +: 16];
    end
    if (is_sched) c.sch_off  = r[16*7 +: 16];
    else          c.addr_off = r[16*7 +: 16];
    return c;
  endfunction

endpackage
