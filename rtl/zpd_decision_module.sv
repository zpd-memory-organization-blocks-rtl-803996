// zpd_decision_module: the Decision Module board (block 0x8000).
//
// It collects the fitted tracks of all six Fitters, applies the selection
// windows of eight decision bits and issues the trigger decision per event.
//   * zpd_dm_fitter_results: the six Fitter links, stored at 0x4000..0x4BFF
//     (0x200 words per Fitter) and gathered into the twelve tracks of an event,
//   * zpd_decision: windows at 0x0xy0..0x0xy6, 4-bit mask at 0x0F0, decision
//     bits, Output memory at 0x3000..0x303F,
//   * zpd_daq_buffer: 32-bit DAQ memories, 832-word circular buffer, four
//     200-word output buffers, offset at 0x2A00. One word per decided event is
//     written into the circular buffer: {18'b0, event[5:0], decision[7:0]}
//     (this layout is this design's choice; the DAQ format is not defined),
//   * the common registers; status = {dropped accepts[7:0], daq busy, 1'b0,
//     last decided event[5:0]}.
// Timing: the decision of an event leaves on 'dec_*' two cycles after the
// last word of the last Fitter link. Host reads return one cycle after the
// request.
module zpd_decision_module
  import zpd_pkg::*;
#(
  parameter logic [15:0] VERSION = 16'h0100
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  fit_link_t [N_FITTERS-1:0]   link,
  output logic                        dec_valid,
  output logic [5:0]                  dec_event,
  output logic [N_DECISION-1:0]       dec_bits,
  output logic [3:0]                  mask,
  // trigger accept for the DAQ readout
  input  logic                        accept,
  output logic                        daq_done,
  output logic [1:0]                  daq_buf,
  // host bus
  input  host_req_t                   req,
  output host_rsp_t                   rsp
);

  logic        sel;
  logic [15:0] status, control;
  logic [DATA_W-1:0] rd_misc, rd_fit, rd_dec, rd_daq;
  logic        ev_valid;
  logic [5:0]  ev_event;
  fit_track_t [N_FITTERS-1:0][1:0] ev_track;
  logic        daq_busy;
  logic [7:0]  dropped;

  zpd_host_port #(.ID(BLK_DM), .VERSION(VERSION)) u_port (
    .clk, .rst_n, .req, .status, .sel, .control, .rdata(rd_misc)
  );

  zpd_dm_fitter_results u_fit (
    .clk, .rst_n, .link, .ev_valid, .ev_event, .ev_track, .req, .sel, .rdata(rd_fit)
  );

  zpd_decision u_dec (
    .clk, .rst_n, .ev_valid, .ev_event, .ev_track,
    .dec_valid, .dec_event, .dec_bits, .mask, .req, .sel, .rdata(rd_dec)
  );

  zpd_daq_buffer #(.W(32), .CIRC_DEPTH(832), .BUF_LEN(200)) u_daq (
    .clk, .rst_n,
    .in_valid(dec_valid), .in_data({18'b0, dec_event, dec_bits}),
    .accept, .busy(daq_busy), .done(daq_done), .done_buf(daq_buf), .dropped,
    .req, .sel, .rdata(rd_daq)
  );

  assign status = {dropped, daq_busy, 1'b0, dec_event};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsp.valid <= 1'b0;
    else        rsp.valid <= sel && req.re;
  end
  assign rsp.rdata = rd_misc | rd_fit | rd_dec | rd_daq;

endmodule
