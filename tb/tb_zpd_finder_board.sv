// tb_zpd_finder_board: Finder 4 (block 0x0200). Sends one Megabus event,
// checks the rebuilt event at a few SL:sector positions and its timing, the
// Megabus diagnostic memory (14 bits kept), a Finder track written by the
// algorithm port and read back, both look-up tables from host and
// algorithm side (the second one 32 bits wide), and that the SL7 and
// all-Finder group identifiers reach the board while the SL10 one does not.
module tb_zpd_finder_board;
  import zpd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  host_req_t req;
  host_rsp_t rsp;
  mb_beat_t mb;
  logic ev_valid;
  logic [5:0] ev_event;
  sl_event_t ev_seg;
  sl_present_t ev_present;
  logic trk_valid, trk_seed;
  logic [5:0] trk_event;
  finder_track_t trk;
  logic lut_sel;
  logic [15:0] lut_idx;
  logic [31:0] lut_data;

  localparam logic [15:0] ME = 16'h0200;

  zpd_finder_board #(.ID(ME)) dut (
    .clk, .rst_n, .mb, .ev_valid, .ev_event, .ev_seg, .ev_present,
    .trk_valid, .trk_event, .trk_seed, .trk, .lut_sel, .lut_idx, .lut_data, .req, .rsp
  );

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic hwrite(logic [15:0] blk, logic [15:0] addr, logic [31:0] dd);
    @(negedge clk);
    req = '0; req.blk = blk; req.addr = addr; req.wdata = dd; req.we = 1'b1;
    @(negedge clk);
    req = '0;
  endtask

  task automatic hread(logic [15:0] blk, logic [15:0] addr, output logic [31:0] d, output logic v);
    @(negedge clk);
    req = '0; req.blk = blk; req.addr = addr; req.re = 1'b1;
    @(negedge clk);
    d = rsp.rdata; v = rsp.valid;
    req = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [13:0] sent [N_TICK][N_MB_SEG];
  logic [31:0] d, pre;
  logic v;
  int n_ev = 0;
  always @(negedge clk) if (ev_valid) n_ev++;

  initial begin
    req = '0; mb = '0; trk_valid = 1'b0; trk_seed = 1'b0; trk_event = '0; trk = '0;
    lut_sel = 1'b0; lut_idx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < N_TICK; t++) begin
      @(negedge clk);
      mb.valid = 1'b1; mb.event_num = 6'd9; mb.tick = 5'(t);
      for (int s = 0; s < N_MB_SEG; s++) begin
        mb.seg[s] = 14'($urandom);
        sent[t][s] = mb.seg[s];
      end
    end
    @(negedge clk); mb = '0;
    check("event out right after tick 31", 32'(ev_valid), 1);
    check("event number", 32'(ev_event), 9);
    // SL1:1 on Megabus segment 4, ticks 0..2; SL8:4 on segment 0, ticks 27..29;
    // SL5:0 on segment 2, ticks 15..17
    for (int k = 0; k < 3; k++) begin
      check("SL1:1", 32'(ev_seg[0][1][k]), 32'(sent[k][4]));
      check("SL8:4", 32'(ev_seg[7][4][k]), 32'(sent[27 + k][0]));
      check("SL5:0", 32'(ev_seg[4][0][k]), 32'(sent[15 + k][2]));
    end
    check("SL10:0 absent", 32'(ev_present[9][0]), 0);
    check("SL2:0 present", 32'(ev_present[1][0]), 1);
    // Megabus diagnostic memory
    for (int t = 0; t < N_TICK; t += 5)
      for (int s = 0; s < N_MB_SEG; s++) begin
        hread(ME, 16'h4900 + 16'h20 * 16'(s) + 16'(t), d, v);
        check("megabus memory", d, 32'(sent[t][s]));
      end
    // Finder track
    @(negedge clk);
    trk_valid = 1'b1; trk_event = 6'd9; trk_seed = 1'b1;
    trk.hitmask = 10'h3A5; trk.dipbin = 6'h2B; trk.rhobin = 6'h11;
    for (int k = 0; k < 10; k++) trk.segphi[k] = 16'h100 * 16'(k) + 16'h0C;
    @(negedge clk); trk_valid = 1'b0;
    hread(ME, 16'h1000 + 16'h20 * 9 + 16'h10 + 0, d, v); check("track hitmask", d, 32'h3A5);
    hread(ME, 16'h1000 + 16'h20 * 9 + 16'h10 + 1, d, v); check("track bins", d, 32'(6'h2B) * 64 + 32'h11);
    hread(ME, 16'h1000 + 16'h20 * 9 + 16'h10 + 4, d, v); check("track segphi SL3", d, 32'h020C);
    hread(ME, 16'h1000 + 16'h20 * 9 + 16'h10 + 11, d, v); check("track segphi SL10", d, 32'h090C);
    // LUTs
    hwrite(BLK_SL7_FINDERS, 16'h8005, 32'hDEAD_1234);
    hwrite(BLK_ALL_FINDERS, 16'hE7FF, 32'hCAFE_F00D);
    hread(ME, 16'h8006, pre, v);
    hwrite(BLK_SL10_FINDERS, 16'h8006, ~pre);
    hread(ME, 16'h8005, d, v); check("seed phi LUT 16 bits", d, 32'h1234);
    hread(ME, 16'hE7FF, d, v); check("expected phi LUT 32 bits", d, 32'hCAFE_F00D);
    hread(ME, 16'h8006, d, v); check("SL10 group does not reach Finder 4", d, pre);
    @(negedge clk); lut_sel = 1'b1; lut_idx = 16'h27FF;
    @(negedge clk); check("alg LUT read", lut_data, 32'hCAFE_F00D);
    lut_sel = 1'b0; lut_idx = 16'h0005;
    @(negedge clk); check("alg LUT read 0", lut_data, 32'h1234);
    hread(ME, A_STATUS, d, v); check("status", d, 9);
    check("one event", 32'(n_ev), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
