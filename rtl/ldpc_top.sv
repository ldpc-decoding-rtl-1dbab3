// ldpc_top: top level holding the LDPC decoder datapaths side by side.
//
// The main design is the layered decoder for the rate 2/3, 8-layer, 24-block-column irregular
// QC-LDPC code with 96x96 circulants, processing one circulant per clock with out-of-order block
// scheduling. Next to it, with their own ports, stand the other decoder organisations: the
// block-serial non-layered (flooding) decoder for the array code with 4 block rows, 36 block
// columns and 128x128 circulants; a stand-alone variable node unit of that decoder for column
// degree 4; and a fully parallel min-sum check node unit of degree 8 built on the bitonic
// Min1-Min2 finder. They share only the clock and reset with the layered decoder.
// Interface and timing of each part are described in its own module.
module ldpc_top
  import ldpc_pkg::*;
#(
  parameter int SC       = 96,
  parameter int MAX_ITER = 10,
  parameter int NL_SC    = 128,   // non-layered decoder: circulant size
  parameter int NL_NBC   = 36,    // non-layered decoder: block columns
  parameter int NL_NBR   = 4,     // non-layered decoder: block rows
  localparam int COL_W   = clog2_min1(NB),
  localparam int NL_COL_W = clog2_min1(NL_NBC)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // layered decoder
  input  logic                     llr_we,
  input  logic [COL_W-1:0]         llr_addr,
  input  logic [SC-1:0][LLR_W-1:0] llr_data,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic                     converged,
  output logic [7:0]               iterations,
  input  logic [COL_W-1:0]         hd_raddr,
  output logic [SC-1:0]            hd_rdata,
  output logic [31:0]              dep_stall_cycles,
  output logic [31:0]              drain_cycles,
  output logic [31:0]              reorder_issues,
  // non-layered decoder
  input  logic                        nl_llr_we,
  input  logic [NL_COL_W-1:0]         nl_llr_addr,
  input  logic [NL_SC-1:0][LLR_W-1:0] nl_llr_data,
  input  logic                        nl_start,
  output logic                        nl_busy,
  output logic                        nl_done,
  output logic                        nl_converged,
  output logic [7:0]                  nl_iterations,
  input  logic [NL_COL_W-1:0]         nl_hd_raddr,
  output logic [NL_SC-1:0]            nl_hd_rdata,
  output logic                        nl_ext_valid,
  output logic [NL_COL_W-1:0]         nl_ext_col,
  output logic [NL_SC-1:0][4:0]       nl_ext_data,
  // stand-alone variable node unit
  input  logic [3:0][4:0]          vnu_r,
  input  logic [4:0]               vnu_l,
  output logic [3:0][4:0]          vnu_q,
  output logic [4:0]               vnu_e,
  output logic                     vnu_hd,
  // parallel check node unit
  input  logic [7:0][4:0]          pcnu_q,
  output logic [7:0][4:0]          pcnu_r,
  output logic [3:0]               pcnu_m1,
  output logic [3:0]               pcnu_m2,
  output logic [2:0]               pcnu_m1_idx
);

  layered_decoder #(.SC(SC), .MAX_ITER(MAX_ITER)) u_layered (
    .clk, .rst_n, .llr_we, .llr_addr, .llr_data, .start,
    .busy, .done, .converged, .iterations, .hd_raddr, .hd_rdata,
    .dep_stall_cycles, .drain_cycles, .reorder_issues
  );

  nonlayered_decoder #(.SC(NL_SC), .NBC(NL_NBC), .NBR(NL_NBR), .MAX_ITER(MAX_ITER)) u_nonlayered (
    .clk, .rst_n, .llr_we(nl_llr_we), .llr_addr(nl_llr_addr), .llr_data(nl_llr_data),
    .start(nl_start), .busy(nl_busy), .done(nl_done), .converged(nl_converged),
    .iterations(nl_iterations), .hd_raddr(nl_hd_raddr), .hd_rdata(nl_hd_rdata),
    .ext_valid(nl_ext_valid), .ext_col(nl_ext_col), .ext_data(nl_ext_data)
  );

  vnu #(.DV(4)) u_vnu (.r(vnu_r), .l(vnu_l), .q(vnu_q), .e(vnu_e), .hd(vnu_hd));

  cnu_parallel #(.DC(8)) u_pcnu (.q(pcnu_q), .r(pcnu_r), .m1(pcnu_m1), .m2(pcnu_m2), .m1_idx(pcnu_m1_idx));

endmodule
