// tb_zpd_decision_module: the Decision Module board on its own. Sets the
// windows of decision bit 1 for A10 tracks and bit 2 for A7 tracks, sends
// two events over the six Fitter links (first event: an A10 track inside
// bit 1; second: an A7 track inside bit 2 and an A10 track with empty
// hitmask) and checks the decision bits, their latency (two cycles after the
// last link word), the Output memory, the stored Fitter words, the DAQ
// readout of the decision words and the status register.
module tb_zpd_decision_module;
  import zpd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  host_req_t req;
  host_rsp_t rsp;
  fit_link_t [N_FITTERS-1:0] link;
  logic dec_valid, accept, daq_done;
  logic [5:0] dec_event;
  logic [7:0] dec_bits;
  logic [3:0] mask;
  logic [1:0] daq_buf;

  zpd_decision_module dut (.clk, .rst_n, .link, .dec_valid, .dec_event, .dec_bits, .mask,
                           .accept, .daq_done, .daq_buf, .req, .rsp);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic hwrite(logic [15:0] addr, logic [31:0] dd);
    @(negedge clk);
    req = '0; req.blk = BLK_DM; req.addr = addr; req.wdata = dd; req.we = 1'b1;
    @(negedge clk);
    req = '0;
  endtask

  task automatic hread(logic [15:0] addr, output logic [31:0] d);
    @(negedge clk);
    req = '0; req.blk = BLK_DM; req.addr = addr; req.re = 1'b1;
    @(negedge clk);
    d = rsp.rdata;
    req = '0;
  endtask

  // 8 words per fitter: two tracks {hitmask, rho<<4|z0err, z0, dip}
  logic [11:0] w [N_FITTERS][8];
  int cyc = 0, last_cyc = 0, dec_cyc = 0;
  logic [7:0] got_bits [2];
  int n_dec = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n && dec_valid) begin
    if (n_dec < 2) got_bits[n_dec] = dec_bits;
    dec_cyc = cyc;
    n_dec++;
  end

  task automatic send_event(int e);
    for (int c = 0; c < 8; c++) begin
      @(negedge clk);
      for (int f = 0; f < N_FITTERS; f++) begin
        link[f].valid = 1'b1; link[f].event_num = 6'(e); link[f].word = 3'(c); link[f].data = w[f][c];
      end
      last_cyc = cyc;
    end
    @(negedge clk); link = '0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] d;
  initial begin
    req = '0; link = '0; accept = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // bit 1, A10: rho 40..60, dip 0..255, z0 100..140, z0err <= 5
    hwrite(16'h0100, 40); hwrite(16'h0101, 60); hwrite(16'h0102, 0); hwrite(16'h0103, 255);
    hwrite(16'h0104, 100); hwrite(16'h0105, 140); hwrite(16'h0106, 5);
    // bit 2, A7: rho 200..250, dip 10..20, z0 0..255, z0err <= 15
    hwrite(16'h0210, 200); hwrite(16'h0211, 250); hwrite(16'h0212, 10); hwrite(16'h0213, 20);
    hwrite(16'h0214, 0); hwrite(16'h0215, 255); hwrite(16'h0216, 15);
    hwrite(16'h00F0, 5);
    check("mask", 32'(mask), 5);
    // event 3: Fitter 1 seed 1 inside bit 1; others empty
    foreach (w[f, k]) w[f][k] = '0;
    w[1][4] = 12'h00F; w[1][5] = {8'd50, 4'd2}; w[1][6] = 12'd120; w[1][7] = 12'd7;
    w[4][0] = 12'h001; w[4][1] = {8'd50, 4'd2}; w[4][2] = 12'd120; w[4][3] = 12'd7;   // A7: not in bit 2
    send_event(3);
    check("decision 1 latency", 32'(dec_cyc - last_cyc), 2);
    // event 4: Fitter 5 seed 0 inside bit 2; Fitter 0 inside bit 1 but empty hitmask
    foreach (w[f, k]) w[f][k] = '0;
    w[5][0] = 12'h3FF; w[5][1] = {8'd210, 4'd15}; w[5][2] = 12'd3; w[5][3] = 12'd15;
    w[0][0] = 12'h000; w[0][1] = {8'd50, 4'd2}; w[0][2] = 12'd120; w[0][3] = 12'd7;
    send_event(4);
    check("two decisions", 32'(n_dec), 2);
    check("event 3 bits", 32'(got_bits[0]), 32'h01);
    check("event 4 bits", 32'(got_bits[1]), 32'h02);
    hread(16'h3003, d); check("output mem 3", d, 32'h01);
    hread(16'h3004, d); check("output mem 4", d, 32'h02);
    hread(16'h4000 + 16'h200 * 5 + 8 * 4 + 1, d); check("fitter 5 word", d, 32'(w[5][1]));
    hread(A_STATUS, d); check("status last event", d & 32'h3F, 4);
    // DAQ: offset 2 -> the two decision words
    hwrite(16'h2A00, 2);
    @(negedge clk); accept = 1'b1; @(negedge clk); accept = 1'b0;
    while (!daq_done) @(negedge clk);
    hread(16'h2000, d); check("daq word 0", d, {18'b0, 6'd3, 8'h01});
    hread(16'h2001, d); check("daq word 1", d, {18'b0, 6'd4, 8'h02});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
