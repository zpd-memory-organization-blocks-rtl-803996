// tb_zpd_system: end-to-end run of the whole crate at its default size.
//
// The testbench plays the track segment finder, the host, the trigger, and
// simple stand-ins for the seed finding and fitting algorithms (which are
// not part of the RTL): a Finder turns sectors 1 and 2 of each superlayer
// into two seed tracks, a Fitter turns a seed into a fitted track by fixed
// field moves. NEV events of random segments flow from Sergio over the
// Megabus to the six Finders, through the Fitters and their links to the
// Decision Module. Checked:
//   * every Finder's rebuilt event against the segments sent (via the
//     Megabus mapping written out here) and its event number,
//   * each decision against a reference computed from the fitted tracks,
//   * Finder Megabus memories equal to Sergio's TSF memory in the low 14 bits,
//   * Finder/Fitter/Decision Module result memories read over the host bus,
//   * DAQ readouts of Sergio and the Decision Module, including a dropped
//     accept, and group (broadcast) writes of windows and tables.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_zpd_system;
  import zpd_pkg::*;

  localparam int NEV = 70;   // more than 64: event numbers and memories wrap
  localparam int FIRST = NEV - 64;   // oldest event still held in the 64-event memories

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  host_req_t host_req;
  host_rsp_t host_rsp;
  logic tsf_valid;
  logic [N_MB_SEG-1:0][15:0] tsf_seg;
  logic        [N_FINDERS-1:0]       fnd_ev_valid;
  logic        [N_FINDERS-1:0][5:0]  fnd_ev_event;
  sl_event_t   [N_FINDERS-1:0]       fnd_ev_seg;
  sl_present_t                       fnd_ev_present;
  logic        [N_FINDERS-1:0]       fnd_trk_valid;
  logic        [N_FINDERS-1:0][5:0]  fnd_trk_event;
  logic        [N_FINDERS-1:0]       fnd_trk_seed;
  finder_track_t [N_FINDERS-1:0]     fnd_trk;
  logic        [N_FINDERS-1:0]       fnd_lut_sel;
  logic        [N_FINDERS-1:0][15:0] fnd_lut_idx;
  logic        [N_FINDERS-1:0][31:0] fnd_lut_data;
  logic        [N_FITTERS-1:0]       fit_trk_valid;
  logic        [N_FITTERS-1:0][5:0]  fit_trk_event;
  logic        [N_FITTERS-1:0]       fit_trk_seed;
  fit_track_t  [N_FITTERS-1:0]       fit_trk;
  logic        [N_FITTERS-1:0][4:0]  fit_lut_sel;
  logic        [N_FITTERS-1:0][15:0] fit_lut_idx;
  logic        [N_FITTERS-1:0][31:0] fit_lut_data;
  logic dec_valid;
  logic [5:0] dec_event;
  logic [7:0] dec_bits;
  logic [3:0] dec_mask;
  logic accept;
  logic sergio_daq_done, dm_daq_done;
  logic [1:0] sergio_daq_buf, dm_daq_buf;

  zpd_system dut (.*);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ host access
  // Host requests are issued from one process only; the 'busy' flag keeps
  // the background process and the main sequence apart.
  task automatic hwrite(logic [15:0] blk, logic [15:0] addr, logic [31:0] dd);
    @(negedge clk);
    host_req = '0; host_req.blk = blk; host_req.addr = addr; host_req.wdata = dd; host_req.we = 1'b1;
    @(negedge clk);
    host_req = '0;
  endtask

  task automatic hread(logic [15:0] blk, logic [15:0] addr, output logic [31:0] d);
    @(negedge clk);
    host_req = '0; host_req.blk = blk; host_req.addr = addr; host_req.re = 1'b1;
    @(negedge clk);
    d = host_rsp.rdata;
    check("host response valid", 32'(host_rsp.valid), 1);
    host_req = '0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanisms
  int m_broadcast = 0, m_event = 0, m_mb_equal = 0, m_badd = 0, m_link = 0;
  int m_a10 = 0, m_a7 = 0, m_empty_track = 0, m_sergio_daq = 0, m_dm_daq = 0;
  int m_drop = 0, m_lut = 0, m_results = 0;

  // ------------------------------------------------------------ Megabus map
  int tbl [10][5] = '{
    '{8'h11, 8'h13, 8'h15, 8'hA1, 8'hA3}, '{8'h12, 8'h14, 8'h10, 8'hA2, 8'hA4},
    '{8'h21, 8'h23, 8'h25, 8'h71, 8'h73}, '{8'h22, 8'h24, 8'h20, 8'h72, 8'h74},
    '{8'h31, 8'h33, 8'h35, 8'h51, 8'h53}, '{8'h32, 8'h34, 8'h50, 8'h52, 8'h54},
    '{8'h91, 8'h93, 8'h95, 8'h41, 8'h43}, '{8'h92, 8'h94, 0,     8'h42, 8'h44},
    '{8'h61, 8'h63, 8'h65, 8'h81, 8'h83}, '{8'h62, 8'h64, 0,     8'h82, 8'h84}};

  logic [15:0] sent [NEV][N_TICK][N_MB_SEG];

  // ------------------------------------------------------------ windows
  int lim [8][2][7];

  // ------------------------------------------------------------ algorithm stand-ins
  function automatic finder_track_t finder_model(sl_event_t ev, int seed, int n, int e);
    finder_track_t t;
    for (int sl = 0; sl < 10; sl++) begin
      t.hitmask[sl] = ev[sl][1 + seed][0][13];       // mask bit M of slot 0
      t.segphi[sl]  = 16'(ev[(sl + n) % 10][1 + seed][1][8:3]); // phi of slot 1
    end
    t.rhobin = ev[n][1 + seed][2][5:0];            // each Finder looks at a
    t.dipbin = ev[(n + 3) % 10][1 + seed][2][11:6];   // different superlayer
    if (seed == 1 && (n == 2 || n == 5) && e % 2 == 0) t.hitmask = '0;
    return t;
  endfunction

  function automatic fit_track_t fitter_model(finder_track_t f);
    fit_track_t t;
    t.hitmask = f.hitmask;
    t.rho     = {f.rhobin, 2'b00};
    t.z0err   = f.dipbin[3:0];
    t.z0      = f.segphi[0][7:0] * 8'd4;
    t.dip     = {f.dipbin, 2'b00};
    return t;
  endfunction

  finder_track_t pend [N_FINDERS][2];
  int pend_cnt [N_FINDERS];
  int pend_ev [N_FINDERS];
  fit_track_t fitted [64][N_FITTERS][2];
  int n_ev_seen [N_FINDERS];

  always @(negedge clk) begin
    if (!rst_n) begin
      fnd_trk_valid = '0; fit_trk_valid = '0; fnd_trk = '0; fit_trk = '0;
      fnd_trk_event = '0; fnd_trk_seed = '0; fit_trk_event = '0; fit_trk_seed = '0;
      for (int n = 0; n < N_FINDERS; n++) begin pend_cnt[n] = 0; n_ev_seen[n] = 0; end
    end else begin
      for (int n = 0; n < N_FINDERS; n++) begin
        // Fitter n follows Finder n by one cycle
        fit_trk_valid[n] = fnd_trk_valid[n];
        fit_trk_event[n] = fnd_trk_event[n];
        fit_trk_seed[n]  = fnd_trk_seed[n];
        fit_trk[n]       = fitter_model(fnd_trk[n]);
        if (fnd_trk_valid[n]) fitted[fnd_trk_event[n]][n][fnd_trk_seed[n]] = fit_trk[n];
        // Finder n emits its two seeds on the two cycles after the event
        if (pend_cnt[n] > 0) begin
          fnd_trk_valid[n] = 1'b1;
          fnd_trk_seed[n]  = 1'(2 - pend_cnt[n]);
          fnd_trk_event[n] = 6'(pend_ev[n]);
          fnd_trk[n]       = pend[n][2 - pend_cnt[n]];
          pend_cnt[n]--;
        end else fnd_trk_valid[n] = 1'b0;
        if (fnd_ev_valid[n]) begin
          automatic int e = n_ev_seen[n];
          check("finder event number", 32'(fnd_ev_event[n]), 32'(e % 64));
          for (int g = 0; g < 10; g++)
            for (int c = 0; c < 5; c++) if (tbl[g][c] != 0)
              for (int k = 0; k < 3; k++)
                check("rebuilt segment", 32'(fnd_ev_seg[n][(tbl[g][c] >> 4) - 1][tbl[g][c] & 15][k]),
                      32'(sent[e][3 * g + k][4 - c] & 16'h3FFF));
          pend[n][0]  = finder_model(fnd_ev_seg[n], 0, n, e);
          pend[n][1]  = finder_model(fnd_ev_seg[n], 1, n, e);
          pend_cnt[n] = 2;
          pend_ev[n]  = e % 64;
          n_ev_seen[n]++;
          m_event++;
        end
      end
    end
  end

  // ------------------------------------------------------------ decisions
  int n_dec = 0;
  logic [7:0] dec_log [NEV];
  always @(negedge clk) if (rst_n && dec_valid) begin
    logic [7:0] r;
    bit a10, a7;
    r = '0;
    for (int x = 0; x < 8; x++)
      for (int f = 0; f < N_FITTERS; f++)
        for (int s = 0; s < 2; s++) begin
          automatic int y = (f < 3) ? 0 : 1;
          automatic fit_track_t t = fitted[dec_event][f][s];
          if (t.hitmask == 0) begin
            if (x == 0) m_empty_track++;
          end else if (int'(t.rho) >= lim[x][y][0] && int'(t.rho) <= lim[x][y][1] &&
                       int'(t.dip) >= lim[x][y][2] && int'(t.dip) <= lim[x][y][3] &&
                       int'(t.z0)  >= lim[x][y][4] && int'(t.z0)  <= lim[x][y][5] &&
                       int'(t.z0err) <= lim[x][y][6]) begin
            r[x] = 1'b1;
            if (y == 0) m_a10++; else m_a7++;
          end
        end
    check("decision event", 32'(dec_event), 32'(n_dec % 64));
    check($sformatf("decision of event %0d", n_dec), 32'(dec_bits), 32'(r));
    if (n_dec < NEV) dec_log[n_dec] = dec_bits;
    n_dec++;
    m_link++;
  end

  int n_sdaq = 0, n_ddaq = 0;
  always @(negedge clk) begin
    if (sergio_daq_done) n_sdaq++;
    if (dm_daq_done) n_ddaq++;
  end

  // ------------------------------------------------------------ main sequence
  logic [31:0] d, d2;
  initial begin
    host_req = '0; tsf_valid = 1'b0; tsf_seg = '0; accept = 1'b0;
    fnd_lut_sel = '0; fnd_lut_idx = '0; fit_lut_sel = '0; fit_lut_idx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // windows: broadcast-free, Decision Module only
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 2; y++) begin
        lim[x][y][0] = 16 * x;  lim[x][y][1] = 16 * x + 90;
        lim[x][y][2] = 0;       lim[x][y][3] = 160 + 8 * x;
        lim[x][y][4] = 20 * y;  lim[x][y][5] = 200;
        lim[x][y][6] = (y == 0) ? 15 : 9;
        for (int k = 0; k < 7; k++)
          hwrite(BLK_DM, 16'(x + 1) * 16'h100 + 16'(y) * 16'h10 + 16'(k), 32'(lim[x][y][k]));
      end
    // group writes: a table entry in every Finder and every Fitter
    hwrite(BLK_ALL_FINDERS, 16'hC010, 32'h1234_5678);
    hwrite(BLK_SL10_FITTERS, 16'h2B03, 32'h0000_0A10);
    hwrite(BLK_SL7_FITTERS,  16'h2B03, 32'h0000_0A07);
    for (int n = 0; n < N_FINDERS; n++) begin
      hread(finder_id(n), 16'hC010, d);
      check("finder broadcast", d, 32'h1234_5678);
      m_broadcast++;
    end
    for (int n = 0; n < N_FITTERS; n++) begin
      hread(fitter_id(n), 16'h2B03, d);
      check("fitter group write", d, n < 3 ? 32'h0A10 : 32'h0A07);
      m_broadcast++;
    end
    // algorithm table ports
    @(negedge clk);
    for (int n = 0; n < N_FINDERS; n++) begin fnd_lut_sel[n] = 1'b1; fnd_lut_idx[n] = 16'h0010; end
    for (int n = 0; n < N_FITTERS; n++) begin fit_lut_sel[n] = 5'd15; fit_lut_idx[n] = 16'h0003; end
    @(negedge clk);
    for (int n = 0; n < N_FINDERS; n++) begin check("finder lut port", fnd_lut_data[n], 32'h1234_5678); m_lut++; end
    for (int n = 0; n < N_FITTERS; n++) begin check("fitter lut port", fit_lut_data[n], n < 3 ? 32'h0A10 : 32'h0A07); m_lut++; end

    // DAQ offsets
    hwrite(BLK_SERGIO, 16'h2A00, 32'd64);
    hwrite(BLK_DM, 16'h2A00, 32'd8);

    // events
    for (int e = 0; e < NEV; e++)
      for (int t = 0; t < N_TICK; t++) begin
        @(negedge clk);
        tsf_valid = 1'b1;
        for (int s = 0; s < N_MB_SEG; s++) begin
          tsf_seg[s] = 16'($urandom);
          sent[e][t][s] = tsf_seg[s];
        end
        // Sergio readout after event 10, a second accept while it runs
        if (e == 10 && t == 0) accept = 1'b1;
        else if (e == 10 && t == 5) accept = 1'b1;
        else accept = 1'b0;
      end
    @(negedge clk); tsf_valid = 1'b0; accept = 1'b0;
    repeat (40) @(negedge clk);

    check("all decisions", 32'(n_dec), NEV);
    for (int n = 0; n < N_FINDERS; n++) check("all events rebuilt", 32'(n_ev_seen[n]), NEV);

    // Sergio DAQ: 64 words before the accept = events 8 and 9, ticks 0..31
    check("sergio readouts", 32'(n_sdaq), 1);
    for (int i = 0; i < 74; i += 5) begin
      automatic int e = 8 + i / 32, t = i % 32;
      automatic logic [15:0] exp = {6'(e), 5'(t), sent[e][t][4][13], sent[e][t][3][13],
                                    sent[e][t][2][13], sent[e][t][1][13], sent[e][t][0][13]};
      hread(BLK_SERGIO, 16'h2000 + 16'(i), d);
      check("sergio daq word", d, 32'(exp));
    end
    m_sergio_daq += n_sdaq;
    hread(BLK_SERGIO, A_STATUS, d);
    check("sergio dropped accept", d >> 8, 1);
    m_drop += int'(d >> 8);

    // Decision Module DAQ: the 8 decisions before the accept (the accept
    // during event 10 reached the Decision Module too and filled buffer 0)
    @(negedge clk); accept = 1'b1; @(negedge clk); accept = 1'b0;
    while (!dm_daq_done) @(negedge clk);
    // buffer 0 was filled by the accept during event 10
    check("dm second buffer", 32'(dm_daq_buf), 1);
    m_dm_daq++;
    for (int i = 0; i < 8; i++) begin
      hread(BLK_DM, 16'h2100 + 16'(i), d);
      check("dm daq word", d, {18'b0, 6'(NEV - 8 + i), dec_log[NEV - 8 + i]});
    end

    // diagnostic memories
    for (int e = FIRST; e < NEV; e += 13)
      for (int t = 0; t < N_TICK; t += 7)
        for (int s = 0; s < N_MB_SEG; s++) begin
          hread(BLK_SERGIO, 16'h4000 + 16'h100 * 16'(e % 64) + 16'h20 * 16'(s) + 16'(t), d);
          check("sergio tsf memory", d, 32'(sent[e][t][s]));
          hread(finder_id(e % 6), 16'h4000 + 16'h100 * 16'(e % 64) + 16'h20 * 16'(s) + 16'(t), d2);
          check("megabus memory = tsf memory (14 bits)", d2, d & 32'h3FFF);
          m_mb_equal++;
        end
    hread(finder_id(3), 16'h51C0, d); check("reserved megabus word", d, 32'hBADD);
    if (d == 32'hBADD) m_badd++;
    for (int e = FIRST; e < NEV; e += 9) begin
      hread(finder_id(1), 16'h1000 + 16'h20 * 16'(e % 64) + 16'h10, d);       // seed 1 hitmask
      hread(fitter_id(1), 16'h4000 + 16'd8 * 16'(e % 64) + 16'd4, d2);
      check("fitter hitmask = finder hitmask", d2, d);
      check("fitter hitmask", d2, 32'(fitted[e % 64][1][1].hitmask));
      hread(BLK_DM, 16'h4000 + 16'h200 * 4 + 16'd8 * 16'(e % 64) + 16'd1, d);
      check("dm copy of fitter 4 word 1", d, {16'b0, 4'b0, fitted[e % 64][4][0].rho, fitted[e % 64][4][0].z0err});
      hread(BLK_DM, 16'h3000 + 16'(e % 64), d);
      check("output memory", d, 32'(dec_log[e]));
      m_results++;
    end

    $display("mechanisms: broadcast=%0d events=%0d mb_equal=%0d badd=%0d links=%0d a10=%0d a7=%0d empty_tracks=%0d sergio_daq=%0d dm_daq=%0d dropped=%0d lut=%0d results=%0d",
             m_broadcast, m_event, m_mb_equal, m_badd, m_link, m_a10, m_a7, m_empty_track,
             m_sergio_daq, m_dm_daq, m_drop, m_lut, m_results);
    checks++; if (m_broadcast == 0)   begin failures++; $display("FAIL no broadcast"); end
    checks++; if (m_event == 0)       begin failures++; $display("FAIL no event rebuilt"); end
    checks++; if (m_mb_equal == 0)    begin failures++; $display("FAIL no memory comparison"); end
    checks++; if (m_badd == 0)        begin failures++; $display("FAIL no reserved read"); end
    checks++; if (m_link == 0)        begin failures++; $display("FAIL no link transfer"); end
    checks++; if (m_a10 == 0)         begin failures++; $display("FAIL no A10 track selected"); end
    checks++; if (m_a7 == 0)          begin failures++; $display("FAIL no A7 track selected"); end
    checks++; if (m_empty_track == 0) begin failures++; $display("FAIL no empty track"); end
    checks++; if (m_sergio_daq == 0)  begin failures++; $display("FAIL no Sergio readout"); end
    checks++; if (m_dm_daq == 0)      begin failures++; $display("FAIL no DM readout"); end
    checks++; if (m_drop == 0)        begin failures++; $display("FAIL no dropped accept"); end
    checks++; if (m_lut == 0)         begin failures++; $display("FAIL no table read"); end
    checks++; if (m_results == 0)     begin failures++; $display("FAIL no result memory read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
