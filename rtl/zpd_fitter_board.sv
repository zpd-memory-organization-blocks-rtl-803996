// zpd_fitter_board: one Fitter board (blocks 0x0004, 0x0010, ... 0x1000).
//
// A Fitter fits the seed tracks of its Finder and passes the fitted track
// parameters to the Decision Module. The fitting algorithm itself is not
// part of this RTL: it writes its results through 'trk_*' and reads its
// tables through 'lut_*'. The board holds:
//   * the Fitter Results diagnostic memory and the link to the Decision
//     Module (zpd_fitter_results_mem; 0x4000..0x41FF, 12 bits per link word),
//   * the 23 Fitter look-up tables (zpd_lut_bank defaults, 0x100..0x36FF),
//   * the common registers; status = {10'b0, event of the last written track}.
// ID is the board's one-hot block identifier. Host reads return one cycle
// after the request.
module zpd_fitter_board
  import zpd_pkg::*;
#(
  parameter logic [BLK_W-1:0] ID      = 16'h0004,
  parameter logic [15:0]      VERSION = 16'h0100
) (
  input  logic              clk,
  input  logic              rst_n,
  // results from the fitting algorithm
  input  logic              trk_valid,
  input  logic [5:0]        trk_event,
  input  logic              trk_seed,
  input  fit_track_t        trk,
  // look-up table read port of the algorithm
  input  logic [4:0]        lut_sel,
  input  logic [15:0]       lut_idx,
  output logic [31:0]       lut_data,
  // link to the Decision Module
  output fit_link_t         link,
  // host bus
  input  host_req_t         req,
  output host_rsp_t         rsp
);

  logic        sel;
  logic [15:0] status, control;
  logic [DATA_W-1:0] rd_misc, rd_res, rd_lut;
  logic [5:0]  last_event;

  zpd_host_port #(.ID(ID), .VERSION(VERSION)) u_port (
    .clk, .rst_n, .req, .status, .sel, .control, .rdata(rd_misc)
  );

  zpd_fitter_results_mem u_results (
    .clk, .rst_n,
    .wr_valid(trk_valid), .wr_event(trk_event), .wr_seed(trk_seed), .wr_track(trk),
    .link, .req, .sel, .rdata(rd_res)
  );

  zpd_lut_bank u_luts (
    .clk, .rst_n, .lut_sel, .lut_idx, .lut_data, .req, .sel, .rdata(rd_lut)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_event <= '0;
    else if (trk_valid) last_event <= trk_event;
  end
  assign status = {10'b0, last_event};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsp.valid <= 1'b0;
    else        rsp.valid <= sel && req.re;
  end
  assign rsp.rdata = rd_misc | rd_res | rd_lut;

endmodule
