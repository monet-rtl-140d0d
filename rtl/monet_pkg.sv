// monet_pkg: types and constants shared by the MONET mixture-of-experts accelerator.
//
// Numbers: activations, weights and results are 16-bit signed fixed point with 8
// fraction bits (Q8.8); a systolic-array product is Q16.16 and is accumulated in
// ACC_W bits. A vector is one row of the 8x8 processing-element array (LANES
// values), which is also the payload of one network flit. The mesh is the 4x4
// grid of PE islands used in the evaluated configuration; the number format, the
// flit layouts and the opcode encodings are choices of this implementation.
package monet_pkg;

  // -- datapath ---------------------------------------------------------------
  localparam int DATA_W = 16;             // Q8.8 operand width
  localparam int FRAC   = 8;              // fraction bits
  localparam int ACC_W  = 36;             // accumulator width
  localparam int LANES  = 8;              // PEs per array side (8x8 PEs per island)

  typedef logic signed [DATA_W-1:0] data_t;
  typedef data_t [LANES-1:0]        vec_t;

  // -- mesh -------------------------------------------------------------------
  localparam int MESH_X = 4;
  localparam int MESH_Y = 4;
  localparam int NODES  = MESH_X * MESH_Y;
  localparam int NODE_W = $clog2(NODES);
  localparam int NUM_EXPERTS = 16;        // one expert per island
  localparam int MAX_K  = 4;              // largest top-k supported
  localparam int TAG_W  = 8;              // token tag

  // -- runtime configuration (configuration table of an island) ---------------
  typedef enum logic [1:0] {EXP_2 = 2'd0, EXP_4 = 2'd1, EXP_8 = 2'd2, EXP_16 = 2'd3} exp_par_e;

  typedef struct packed {
    logic     act_gelu;   // 1: GELU approximation, 0: ReLU
    logic     sparse;     // 1: sparse (zero-skipping) execution, 0: dense
    exp_par_e exp_par;    // experts hosted per island: 2/4/8/16
    logic     reorder;    // expert reordering / grouping on
    logic     noc_en;     // specialised NoC logic (link reversal, bypass) on
  } cfg_t;

  // -- multicast (Mel) plane --------------------------------------------------
  typedef enum logic [2:0] {
    MF_CFG       = 3'd0,  // data[0][5:0] carries a cfg_t
    MF_GATE_W    = 3'd1,  // gating-weight row <idx>
    MF_EXP_W     = 3'd2,  // expert-weight row <idx> for expert slot <tag>
    MF_TOK_GATE  = 3'd3,  // token <tag> for gating
    MF_TOK_EXP   = 3'd4   // token <tag> for the expert in slot <idx>
  } mel_type_e;

  typedef struct packed {
    logic [NODES-1:0] dest;   // destination island bitmap (multicast)
    mel_type_e        typ;
    logic [3:0]       idx;
    logic [TAG_W-1:0] tag;
    vec_t             data;
  } mel_flit_t;

  // -- aggregation (Bel) plane ------------------------------------------------
  typedef enum logic [0:0] {BF_GATE_RES = 1'b0, BF_EXP_RES = 1'b1} bel_type_e;

  typedef struct packed {
    logic              to_gb;  // 1: leave the mesh towards the global buffer side
    logic [NODE_W-1:0] dest;   // destination island when to_gb = 0
    logic [NODE_W-1:0] src;    // producing island
    bel_type_e         typ;
    logic [TAG_W-1:0]  tag;
    vec_t              data;
  } bel_flit_t;

  // Saturate a wide signed value to a Q8.8 operand.
  function automatic data_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return data_t'(v);
  endfunction

endpackage
