// cascade_weights: block RAM holding the Viola-Jones classifier cascade.
//
// Three parts: a stage table (MAX_STAGES entries of haar_stage_t, each
// naming its slice of the feature table and its pass threshold), a feature
// table (MAX_FEATURES entries of haar_feature_t) and the number of stages in
// use. The cascade is trained offline, so the memory is filled through a
// write port: cfg_sel picks the table, cfg_addr the entry, and cfg_wdata
// holds the entry (right-aligned; the stage count uses its low bits).
//
// Both read ports are synchronous with one cycle of latency, as block RAM
// is. The default sizes hold the common 25-stage, 2913-feature frontal-face
// cascade; the entry formats are defined in fd_pkg and are this
// implementation's own.
module cascade_weights
  import fd_pkg::*;
#(
  parameter int MAX_STAGES   = 25,
  parameter int MAX_FEATURES = 2913
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // load port
  input  logic                          cfg_we,
  input  cfg_sel_e                      cfg_sel,
  input  logic [11:0]                   cfg_addr,
  input  logic [FEAT_BITS-1:0]          cfg_wdata,
  // read ports
  input  logic [$clog2(MAX_STAGES)-1:0] stage_addr,
  output haar_stage_t                   stage_data,
  input  logic [11:0]                   feat_addr,
  output haar_feature_t                 feat_data,
  output logic [7:0]                    num_stages
);
  localparam int SAW = $clog2(MAX_STAGES);
  localparam int FAW = $clog2(MAX_FEATURES);

  haar_stage_t   stages   [MAX_STAGES];
  haar_feature_t features [MAX_FEATURES];

  always_ff @(posedge clk) begin
    if (cfg_we && cfg_sel == CFG_STAGE && cfg_addr < 12'(MAX_STAGES))
      stages[cfg_addr[SAW-1:0]] <= haar_stage_t'(cfg_wdata[STAGE_BITS-1:0]);
    stage_data <= stages[stage_addr];
  end

  always_ff @(posedge clk) begin
    if (cfg_we && cfg_sel == CFG_FEATURE && cfg_addr < 12'(MAX_FEATURES))
      features[cfg_addr[FAW-1:0]] <= haar_feature_t'(cfg_wdata);
    feat_data <= features[feat_addr[FAW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      num_stages <= '0;
    else if (cfg_we && cfg_sel == CFG_NSTAGES)
      num_stages <= (cfg_wdata[7:0] > 8'(MAX_STAGES)) ? 8'(MAX_STAGES) : cfg_wdata[7:0];
  end
endmodule
