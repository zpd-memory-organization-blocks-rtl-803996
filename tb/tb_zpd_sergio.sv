// tb_zpd_sergio: feeds two events (64 ticks) of random TSF segments into
// Sergio and checks: the Megabus beat one cycle later (low 14 bits, tick and
// event numbering), the TSF Segment Input memory holding all 16 bits, the
// version/status registers at block 0x0001, that Finder and Fitter group
// identifiers do not reach Sergio, and one DAQ readout of mask words
// {event, tick, M bits} into output buffer 0.
module tb_zpd_sergio;
  import zpd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  host_req_t req;
  host_rsp_t rsp;
  logic tsf_valid, accept, daq_done;
  logic [N_MB_SEG-1:0][15:0] tsf_seg;
  logic [1:0] daq_buf;
  mb_beat_t mb;

  zpd_sergio #(.VERSION(16'h0042)) dut (.clk, .rst_n, .tsf_valid, .tsf_seg, .mb, .accept, .daq_done, .daq_buf, .req, .rsp);

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

  logic [15:0] sent [2][N_TICK][N_MB_SEG];
  logic [31:0] d;
  logic v;
  initial begin
    req = '0; tsf_valid = 1'b0; tsf_seg = '0; accept = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < 2; e++)
      for (int t = 0; t < N_TICK; t++) begin
        @(negedge clk);
        tsf_valid = 1'b1;
        for (int s = 0; s < N_MB_SEG; s++) begin
          tsf_seg[s] = 16'($urandom);
          sent[e][t][s] = tsf_seg[s];
        end
        @(posedge clk); #1;
        check("mb valid", 32'(mb.valid), 1);
        check("mb tick", 32'(mb.tick), 32'(t));
        check("mb event", 32'(mb.event_num), 32'(e));
        for (int s = 0; s < N_MB_SEG; s++)
          check("mb segment 14 bits", 32'(mb.seg[s]), 32'(sent[e][t][s] & 16'h3FFF));
      end
    @(negedge clk); tsf_valid = 1'b0;
    // DAQ readout: offset 64 -> the 64 ticks of both events plus 10 later words
    hwrite(BLK_SERGIO, 16'h2A00, 32'd64);
    @(negedge clk); accept = 1'b1; @(negedge clk); accept = 1'b0;
    while (!daq_done) @(negedge clk);
    check("daq buffer 0", 32'(daq_buf), 0);
    for (int i = 0; i < 64; i++) begin
      automatic int e = i / 32, t = i % 32;
      automatic logic [15:0] exp = {6'(e), 5'(t), sent[e][t][4][13], sent[e][t][3][13],
                                    sent[e][t][2][13], sent[e][t][1][13], sent[e][t][0][13]};
      hread(BLK_SERGIO, 16'h2000 + 16'(i), d, v);
      check($sformatf("mask word %0d", i), d, 32'(exp));
    end
    // TSF memory
    for (int e = 0; e < 2; e++)
      for (int t = 0; t < N_TICK; t += 3)
        for (int s = 0; s < N_MB_SEG; s++) begin
          hread(BLK_SERGIO, 16'h4000 + 16'h100 * 16'(e) + 16'h20 * 16'(s) + 16'(t), d, v);
          check("tsf memory", d, 32'(sent[e][t][s]));
          check("rsp valid", 32'(v), 1);
        end
    hread(BLK_SERGIO, 16'h40A0, d, v); check("reserved", d, 32'hBADD);
    hread(BLK_SERGIO, A_VERSION, d, v); check("version", d, 32'h42);
    hread(BLK_SERGIO, A_STATUS, d, v);  check("status event", d & 32'h3F, 2);
    hread(BLK_ALL_FINDERS, A_VERSION, d, v); check("finders do not reach Sergio", 32'(v), 0);
    hread(BLK_ALL_FITTERS, A_VERSION, d, v); check("fitters do not reach Sergio", 32'(v), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
