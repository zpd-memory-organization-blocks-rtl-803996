// zpd_system: the whole ZPD crate.
//
// Data path: track segments enter Sergio, which records them and sends them
// over the Megabus to six Finders. Each Finder records the Megabus, rebuilds
// the event by superlayer and sector and hands it to its seed finding
// algorithm; Finder n feeds Fitter n. Each Fitter records its fitted tracks
// and sends them on its own 12-bit link to the Decision Module, which forms
// eight decision bits per event. Finders/Fitters 0..2 work on A10 tracks,
// 3..5 on A7 tracks.
//
// The seed finding and track fitting algorithms are not part of this RTL:
// their inputs and outputs are ports of this module (fnd_*, fit_*), so a
// model or a future implementation can be attached from outside.
//
// Host bus: one request per cycle on 'host_req'; every board whose block
// identifier bit is set in host_req.blk takes part, so group identifiers
// (0x002a SL10 Finders, 0x0a80 SL7 Finders, 0x0aaa all Finders, 0x0054,
// 0x1500, 0x1554 for the Fitters) broadcast writes. Reads must address one
// board; the answer comes one cycle later on 'host_rsp'. Block 0x4000
// (clock manager reset) is not decoded here.
//
// 'accept' is the trigger's accept for the DAQ readout of Sergio and the
// Decision Module.
module zpd_system
  import zpd_pkg::*;
(
  input  logic                                    clk,
  input  logic                                    rst_n,
  // host bus
  input  host_req_t                               host_req,
  output host_rsp_t                               host_rsp,
  // segments from the track segment finder
  input  logic                                    tsf_valid,
  input  logic [N_MB_SEG-1:0][15:0]               tsf_seg,
  // Finder algorithm ports, per Finder
  output logic        [N_FINDERS-1:0]             fnd_ev_valid,
  output logic        [N_FINDERS-1:0][5:0]        fnd_ev_event,
  output sl_event_t   [N_FINDERS-1:0]             fnd_ev_seg,
  output sl_present_t                             fnd_ev_present,
  input  logic        [N_FINDERS-1:0]             fnd_trk_valid,
  input  logic        [N_FINDERS-1:0][5:0]        fnd_trk_event,
  input  logic        [N_FINDERS-1:0]             fnd_trk_seed,
  input  finder_track_t [N_FINDERS-1:0]           fnd_trk,
  input  logic        [N_FINDERS-1:0]             fnd_lut_sel,
  input  logic        [N_FINDERS-1:0][15:0]       fnd_lut_idx,
  output logic        [N_FINDERS-1:0][31:0]       fnd_lut_data,
  // Fitter algorithm ports, per Fitter
  input  logic        [N_FITTERS-1:0]             fit_trk_valid,
  input  logic        [N_FITTERS-1:0][5:0]        fit_trk_event,
  input  logic        [N_FITTERS-1:0]             fit_trk_seed,
  input  fit_track_t  [N_FITTERS-1:0]             fit_trk,
  input  logic        [N_FITTERS-1:0][4:0]        fit_lut_sel,
  input  logic        [N_FITTERS-1:0][15:0]       fit_lut_idx,
  output logic        [N_FITTERS-1:0][31:0]       fit_lut_data,
  // decision
  output logic                                    dec_valid,
  output logic [5:0]                              dec_event,
  output logic [N_DECISION-1:0]                   dec_bits,
  output logic [3:0]                              dec_mask,
  // DAQ
  input  logic                                    accept,
  output logic                                    sergio_daq_done,
  output logic [1:0]                              sergio_daq_buf,
  output logic                                    dm_daq_done,
  output logic [1:0]                              dm_daq_buf
);

  mb_beat_t                    mb;
  fit_link_t [N_FITTERS-1:0]   link;
  host_rsp_t                   rsp_sergio, rsp_dm;
  host_rsp_t [N_FINDERS-1:0]   rsp_fnd;
  host_rsp_t [N_FITTERS-1:0]   rsp_fit;
  sl_present_t [N_FINDERS-1:0] present;

  zpd_sergio u_sergio (
    .clk, .rst_n, .tsf_valid, .tsf_seg, .mb,
    .accept, .daq_done(sergio_daq_done), .daq_buf(sergio_daq_buf),
    .req(host_req), .rsp(rsp_sergio)
  );

  for (genvar n = 0; n < N_FINDERS; n++) begin : g_finder
    zpd_finder_board #(.ID(finder_id(n))) u_finder (
      .clk, .rst_n, .mb,
      .ev_valid(fnd_ev_valid[n]), .ev_event(fnd_ev_event[n]),
      .ev_seg(fnd_ev_seg[n]), .ev_present(present[n]),
      .trk_valid(fnd_trk_valid[n]), .trk_event(fnd_trk_event[n]),
      .trk_seed(fnd_trk_seed[n]), .trk(fnd_trk[n]),
      .lut_sel(fnd_lut_sel[n]), .lut_idx(fnd_lut_idx[n]), .lut_data(fnd_lut_data[n]),
      .req(host_req), .rsp(rsp_fnd[n])
    );
  end

  // The SL:sector map is the same on every Finder.
  assign fnd_ev_present = present[0];

  for (genvar n = 0; n < N_FITTERS; n++) begin : g_fitter
    zpd_fitter_board #(.ID(fitter_id(n))) u_fitter (
      .clk, .rst_n,
      .trk_valid(fit_trk_valid[n]), .trk_event(fit_trk_event[n]),
      .trk_seed(fit_trk_seed[n]), .trk(fit_trk[n]),
      .lut_sel(fit_lut_sel[n]), .lut_idx(fit_lut_idx[n]), .lut_data(fit_lut_data[n]),
      .link(link[n]),
      .req(host_req), .rsp(rsp_fit[n])
    );
  end

  zpd_decision_module u_dm (
    .clk, .rst_n, .link,
    .dec_valid, .dec_event, .dec_bits, .mask(dec_mask),
    .accept, .daq_done(dm_daq_done), .daq_buf(dm_daq_buf),
    .req(host_req), .rsp(rsp_dm)
  );

  always_comb begin
    host_rsp = rsp_sergio | rsp_dm;
    for (int n = 0; n < N_FINDERS; n++) host_rsp = host_rsp | rsp_fnd[n];
    for (int n = 0; n < N_FITTERS; n++) host_rsp = host_rsp | rsp_fit[n];
  end

  // A read must address a single board.
  assert property (@(posedge clk) disable iff (!rst_n)
                   host_req.re |-> $countones(host_req.blk & 16'h9FFF) <= 1)
    else $error("host read addressed to more than one board");

endmodule
