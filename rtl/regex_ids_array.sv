// regex_ids_array: the device-level array of rule modules.
//
// All NUM_MODULES rule modules watch the same reassembled byte stream, one
// byte per cycle; each holds its own set of up to 28 pattern segments and its
// own microcontroller program, so the rule set is partitioned across the
// modules (47 modules x 28 segments = 1316 segments with the defaults).
// Every module reports its own matches.
//
// Programming: cfg is written into module cfg_module, or into every module
// when cfg_broadcast is set. The tables can be rewritten while bytes flow.
//
// Outputs per module: match_valid pulses for one cycle when the module's
// program signals a match, with the program's output number on match_id;
// out_reg holds the sticky output bits (out_clear clears them in all
// modules); overflow is sticky and shows that segment events were lost.
// any_match is the OR of all match_valid.
//
// Timing: as regex_module; the array adds no registers.
//
// From the source description: 47 modules on one device sharing the stream.
// Own choices: the shared programming bus with module select and broadcast.
module regex_ids_array
  import regex_pkg::*;
#(
  parameter int unsigned NUM_MODULES = 47,
  parameter int unsigned TILE_STATES = regex_pkg::DEF_TILE_STATES,
  localparam int unsigned MW = (NUM_MODULES > 1) ? $clog2(NUM_MODULES) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [7:0]                   in_byte,
  input  cfg_wr_t                      cfg,
  input  logic [MW-1:0]                cfg_module,
  input  logic                         cfg_broadcast,
  input  logic                         out_clear,
  output logic [NUM_MODULES-1:0]       match_valid,
  output logic [NUM_MODULES-1:0][7:0]  match_id,
  output logic [NUM_MODULES-1:0][15:0] out_reg,
  output logic [NUM_MODULES-1:0]       overflow,
  output logic [NUM_MODULES-1:0]       seg_valid,
  output logic                         any_match
);

  for (genvar m = 0; m < NUM_MODULES; m++) begin : g_mod
    cfg_wr_t cfg_m;
    always_comb begin
      cfg_m    = cfg;
      cfg_m.we = cfg.we && (cfg_broadcast || cfg_module == MW'(m));
    end

    regex_module #(.TILE_STATES(TILE_STATES)) u_mod (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (in_valid),
      .in_byte    (in_byte),
      .cfg        (cfg_m),
      .out_clear  (out_clear),
      .match_valid(match_valid[m]),
      .match_id   (match_id[m]),
      .out_reg    (out_reg[m]),
      .overflow   (overflow[m]),
      .seg_valid  (seg_valid[m]),
      .seg_index  (),
      .seg_count  (),
      .uc_busy    (),
      .fifo_count ()
    );
  end

  assign any_match = |match_valid;

endmodule
