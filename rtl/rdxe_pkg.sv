// rdxe_pkg: types and constants shared by the ring decoder engine (rDXE).
// Widths that follow the source design: INT8 operands, 16 multipliers per
// vector-accumulate core (VAC), a 128-bit activation path, a 32-bit global bus
// (GBUS) and a 25-bit recompute (RC) factor. Everything else here (instruction
// encoding, frame header layout, fixed-point formats) is this implementation's
// own choice and is documented next to each definition.
package rdxe_pkg;

  localparam int N_MUL   = 16;          // multipliers per VAC
  localparam int ACT_W   = N_MUL * 8;   // 128-bit activation / memory word
  localparam int ACC_W   = 32;          // accumulator width
  localparam int RC_W    = 25;          // recompute factor width
  localparam int RC_FRAC = 24;          // RC factor is unsigned Q1.24
  localparam int GBUS_W  = 32;

  // Weight-side operand of a VAC instruction.
  typedef enum logic [1:0] {WS_WMEM = 2'd0, WS_K = 2'd1, WS_V = 2'd2} wsrc_e;
  // Activation source selected by the tile's source mux.
  typedef enum logic [1:0] {AS_TB = 2'd0, AS_RR = 2'd1, AS_RR_GELU = 2'd2, AS_RR_EXP = 2'd3} asrc_e;
  // Destination of the results.
  typedef enum logic [1:0] {DST_RR = 2'd0, DST_K = 2'd1, DST_V = 2'd2, DST_GPPU = 2'd3} dst_e;
  // Recompute (VRC) mode.
  typedef enum logic [1:0] {RC_NONE = 2'd0, RC_RMS = 2'd1, RC_SMAX = 2'd2} rc_e;

  typedef enum logic [3:0] {OP_END = 4'd0, OP_DXT = 4'd1, OP_RES = 4'd2} op_e;

  // One 128-bit instruction of the top controller's instruction register file.
  typedef struct packed {
    logic [29:0] spare;
    logic [7:0]  dxt_mask;   // tiles taking part
    logic [4:0]  shift;      // requantisation right shift
    logic [11:0] rr_dst;     // rr-SRAM byte address of results
    logic [11:0] rr_src;     // rr-SRAM byte address of activations (16-byte aligned)
    logic [15:0] kv_off;     // KV$ word offset (added to the request base)
    logic [15:0] waddr;      // WMEM word base
    logic [7:0]  rows;       // rows per VAC (derived from pos for WS_K)
    logic [7:0]  len_beats;  // 16-element beats per row (derived from pos for WS_V)
    logic        acc;        // global PPU: accumulate onto earlier partial sums
    rc_e         rc;
    dst_e        dst;
    asrc_e       asrc;
    wsrc_e       wsrc;
    op_e         op;
  } instr_t;

  // Static per-instruction configuration broadcast from a tile to its VACs.
  typedef struct packed {
    wsrc_e       wsrc;
    dst_e        dst;
    rc_e         rc;
    logic [7:0]  len_beats;
    logic [7:0]  rows;
    logic [15:0] wbase;      // word base of the weight operand (WMEM or KV$)
    logic [15:0] kv_wbase;   // word base of K/V writes
    logic [15:0] pos;        // token position in its request
    logic [4:0]  shift;
    logic [11:0] rr_dst;
  } vac_cfg_t;

  // One beat travelling on the horizontal link (HLINK) between VACs.
  typedef struct packed {
    logic             valid;
    logic             last;   // last beat of a row
    logic [7:0]       row;
    logic [7:0]       beat;
    logic [ACT_W-1:0] data;
  } hl_t;

  // Destination kinds on the GBUS.
  typedef enum logic [1:0] {GB_RR = 2'd0, GB_KV = 2'd1, GB_GPPU = 2'd2, GB_LOCALV = 2'd3} gbdst_e;

  typedef struct packed {
    gbdst_e      dst;
    logic [3:0]  tgt;        // target VAC for GB_KV
    logic [15:0] addr;       // byte address (word aligned for RR/KV) or row index for GPPU
    logic [3:0]  be;
    logic [31:0] data;
  } gbus_req_t;

  // Frame header (first 128-bit beat of every link frame).
  typedef enum logic [3:0] {CMD_NONE = 4'd0, CMD_TOKEN = 4'd1, CMD_LOAD = 4'd2,
                            CMD_INSTR = 4'd3, CMD_CFG = 4'd4} cmd_e;
  typedef struct packed {
    logic [43:0] spare;
    logic [31:0] addr;       // load: unified word address; instr: first index
    logic [15:0] beats;      // number of data beats that follow
    logic [7:0]  pass;       // ring passes completed (layer sharing)
    logic [15:0] pos;        // token position
    logic [7:0]  req;        // request slot
    cmd_e        cmd;
  } hdr_t;

  // DXE configuration (the data beat of a CMD_CFG frame).
  typedef struct packed {
    logic [60:0] spare;
    logic [15:0] req_stride; // KV$ words per request slot
    logic [1:0]  gqa_log2;   // tiles per KV group = 2**gqa_log2
    logic [31:0] slot_pc;    // program start of layer slots 0..3, 8 bits each
    logic [3:0]  n_slots;    // layer slots held by this DXE
    logic        sym;        // symmetric sharing: reverse slot order on odd passes
    logic [7:0]  n_pass;     // ring passes per token
    logic        ring_last;  // this DXE closes a pass
  } cfg_t;

  // Unified address space of a DXE (128-bit words):
  // [31:28] region (0 WMEM, 1 KV$), [27:25] tile, [24:21] VAC, [20:0] word.
  localparam logic [3:0] REG_WMEM = 4'd0;
  localparam logic [3:0] REG_KV   = 4'd1;

  // Pulses that mark the mechanisms of the design, for observation.
  typedef struct packed {
    logic tok_start;   // a token starts its layer slots in this DXE
    logic slot_rev;    // a layer slot ran in reversed (symmetric) order
    logic op_tb;       // operation with token-buffer broadcast input
    logic op_rr;       // operation with rr-SRAM unicast input
    logic op_rms;      // RMSNorm recompute
    logic op_smax;     // Softmax recompute
    logic op_gelu;     // GELU on the activation path
    logic op_kwr;      // iWuR key write-back
    logic op_vwr;      // local value write-back
    logic op_gqa;      // attention with a shared (GQA) KV group
    logic op_res;      // residual add in the global PPU
    logic stall;       // a stall cycle
    logic fwd_ring;    // token sent on to the next DXE
    logic out_host;    // finished token sent to the host
    logic pass_inc;    // this DXE closed a ring pass
    logic load;        // a load beat was written
  } evt_t;

  function automatic logic signed [7:0] sat8(input logic signed [39:0] v);
    if (v > 40'sd127) return 8'sd127;
    if (v < -40'sd128) return -8'sd128;
    return v[7:0];
  endfunction

  // Round-half-up arithmetic right shift followed by INT8 saturation.
  function automatic logic signed [7:0] quant8(input logic signed [39:0] v, input logic [4:0] sh);
    logic signed [39:0] r;
    r = (sh == 0) ? v : ((v + (40'sd1 <<< (sh - 1))) >>> sh);
    return sat8(r);
  endfunction

endpackage
