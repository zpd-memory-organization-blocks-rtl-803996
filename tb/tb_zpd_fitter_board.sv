// tb_zpd_fitter_board: Fitter 1 (block 0x0010). Writes the two tracks of
// an event through the algorithm port and checks the Fitter Results memory,
// the eight 12-bit link words, a few look-up tables from both sides, the
// status register, and the SL10 / SL7 group identifiers.
module tb_zpd_fitter_board;
  import zpd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  host_req_t req;
  host_rsp_t rsp;
  logic trk_valid, trk_seed;
  logic [5:0] trk_event;
  fit_track_t trk;
  logic [4:0] lut_sel;
  logic [15:0] lut_idx;
  logic [31:0] lut_data;
  fit_link_t link;

  localparam logic [15:0] ME = 16'h0010;

  zpd_fitter_board #(.ID(ME)) dut (
    .clk, .rst_n, .trk_valid, .trk_event, .trk_seed, .trk, .lut_sel, .lut_idx, .lut_data, .link, .req, .rsp
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

  logic [11:0] got_link [8];
  int n_link = 0;
  always @(negedge clk) if (rst_n && link.valid) begin
    got_link[link.word] = link.data;
    check("link event", 32'(link.event_num), 33);
    n_link++;
  end

  logic [31:0] d, pre;
  logic v;
  initial begin
    req = '0; trk_valid = 1'b0; trk_seed = 1'b0; trk_event = '0; trk = '0; lut_sel = '0; lut_idx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    trk_valid = 1'b1; trk_event = 6'd33; trk_seed = 1'b0;
    trk.hitmask = 10'h2FF; trk.rho = 8'hA7; trk.z0err = 4'h3; trk.z0 = 8'h81; trk.dip = 8'h5E;
    @(negedge clk);
    trk_seed = 1'b1;
    trk.hitmask = 10'h155; trk.rho = 8'h12; trk.z0err = 4'hC; trk.z0 = 8'hF0; trk.dip = 8'h07;
    @(negedge clk); trk_valid = 1'b0;
    repeat (10) @(negedge clk);
    check("eight link words", 32'(n_link), 8);
    check("link w0", 32'(got_link[0]), 32'h2FF);
    check("link w1", 32'(got_link[1]), 32'hA73);
    check("link w2", 32'(got_link[2]), 32'h081);
    check("link w3", 32'(got_link[3]), 32'h05E);
    check("link w4", 32'(got_link[4]), 32'h155);
    check("link w5", 32'(got_link[5]), 32'h12C);
    check("link w6", 32'(got_link[6]), 32'h0F0);
    check("link w7", 32'(got_link[7]), 32'h007);
    hread(ME, 16'h4000 + 8 * 33 + 1, d, v); check("mem seed0 w1", d, 32'hA73);
    hread(ME, 16'h4000 + 8 * 33 + 4 + 3, d, v); check("mem seed1 w3", d, 32'h07);
    hread(ME, A_STATUS, d, v); check("status", d, 33);
    // LUTs via group writes
    hwrite(BLK_SL10_FITTERS, 16'h0100, 32'h0001_ABCD);       // phiconv[0]
    hwrite(BLK_ALL_FITTERS,  16'h32FF, 32'h8765_4321);       // sumd2s2 last, 32 bits
    hread(ME, 16'h3500, pre, v);
    hwrite(BLK_SL7_FITTERS,  16'h3500, ~pre);                 // not this board
    hread(ME, 16'h0100, d, v); check("phiconv", d, 32'hABCD);
    hread(ME, 16'h32FF, d, v); check("sumd2s2", d, 32'h8765_4321);
    hread(ME, 16'h3500, d, v); check("SL7 group does not reach Fitter 1", d, pre);
    @(negedge clk); lut_sel = 5'd20; lut_idx = 16'h01FF;
    @(negedge clk); check("alg sumd2s2", lut_data, 32'h8765_4321);
    lut_sel = 5'd0; lut_idx = 16'h0;
    @(negedge clk); check("alg phiconv", lut_data, 32'hABCD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
