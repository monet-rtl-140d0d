// config_unit: the configuration unit of a PE island.
//
// Holds the runtime hyperparameters of the island: activation function (GELU or
// ReLU), execution sparsity (sparse or dense), expert parallelism (2/4/8/16
// experts per island), expert reordering (on/off) and the NoC logic (enable/
// disable). A configuration word is written from the network (cfg_we) and takes
// effect in the next cycle; until then the island runs the reset configuration
// (ReLU, dense, 2 experts, no reordering, NoC logic on). It also decodes the
// expert-parallelism code into a count. The set of hyperparameters and their
// options follow the configuration table of the design; the encoding, the reset
// values and the write-from-network mechanism are this implementation's.
module config_unit
  import monet_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  cfg_t        cfg_in,
  output cfg_t        cfg,
  output logic [4:0]  n_experts
);
  localparam cfg_t RESET_CFG = '{act_gelu: 1'b0, sparse: 1'b0, exp_par: EXP_2,
                                 reorder: 1'b0, noc_en: 1'b1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cfg <= RESET_CFG;
    else if (cfg_we) cfg <= cfg_in;
  end

  always_comb begin
    unique case (cfg.exp_par)
      EXP_2:   n_experts = 5'd2;
      EXP_4:   n_experts = 5'd4;
      EXP_8:   n_experts = 5'd8;
      default: n_experts = 5'd16;
    endcase
  end
endmodule
