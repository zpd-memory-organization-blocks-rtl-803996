// tb_zpd_daq_buffer: streams words into the circular buffer without pause,
// sets offsets and issues five accepts. For each it checks that the copy
// ends BUF_LEN+1 cycles after the accept, that the buffers are filled in the
// order 0,1,2,3,0 and that buffer word i equals the word written OFFSET-i
// positions before the accept (reference kept as a full history). An accept
// during a copy must be dropped and counted. The circular buffer and the
// offset register are also read directly, and a host write to a read-only
// buffer must not change it.
module tb_zpd_daq_buffer;
  import zpd_pkg::*;

  localparam int unsigned W = 16, DEPTH = 640, LEN = 74;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  host_req_t req;
  logic sel;
  logic in_valid, accept, busy, done;
  logic [W-1:0] in_data;
  logic [1:0] done_buf;
  logic [7:0] dropped;
  logic [DATA_W-1:0] rdata;

  zpd_daq_buffer #(.W(W), .CIRC_DEPTH(DEPTH), .BUF_LEN(LEN)) dut (
    .clk, .rst_n, .in_valid, .in_data, .accept, .busy, .done, .done_buf, .dropped, .req, .sel, .rdata
  );

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic hwrite(logic [15:0] addr, logic [31:0] dd);
    @(negedge clk);
    req = '0; req.addr = addr; req.wdata = dd; req.we = 1'b1;
    @(negedge clk);
    req = '0;
  endtask

  task automatic hread(logic [15:0] addr, output logic [31:0] d);
    @(negedge clk);
    req = '0; req.addr = addr; req.re = 1'b1;
    @(negedge clk);
    d = rdata;
    req = '0;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // free-running stream; hist[n] is the n-th word written
  logic [W-1:0] hist [$];
  bit streaming = 1'b0;
  always @(negedge clk) begin
    if (streaming) begin
      in_valid = 1'b1;
      in_data  = W'($urandom);
    end else in_valid = 1'b0;
  end
  always @(posedge clk) if (in_valid) hist.push_back(in_data);

  int offsets [5] = '{100, 74, 300, 639, 1};
  logic [W-1:0] snap [4][LEN];
  logic [31:0] d;
  initial begin
    req = '0; sel = 1'b1; accept = 1'b0; in_valid = 1'b0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    streaming = 1'b1;
    repeat (700) @(negedge clk);
    foreach (offsets[k]) begin
      int n_at, t0, t1;
      hwrite(16'h2A00, 32'(offsets[k]));
      hread(16'h2A00, d); check("offset readback", d, 32'(offsets[k]));
      repeat (20) @(negedge clk);
      accept = 1'b1;
      #1 n_at = hist.size();
      @(negedge clk);
      accept = 1'b0;
      t0 = $time;
      // accept while busy: dropped
      if (k == 2) begin
        repeat (5) @(negedge clk);
        accept = 1'b1; @(negedge clk); accept = 1'b0;
      end
      while (!done) @(negedge clk);
      t1 = $time;
      check("copy time", 32'((t1 - t0) / 10), 32'(LEN + 1));
      check("buffer order", 32'(done_buf), 32'(k % 4));
      for (int i = 0; i < LEN; i++) snap[k % 4][i] = hist[n_at - offsets[k] + i];
      // check the filled buffer now (buffer 0 is refilled by the fifth accept)
      for (int i = 0; i < LEN; i++) begin
        hread(16'h2000 + 16'h100 * 16'(k % 4) + 16'(i), d);
        check($sformatf("accept %0d word %0d", k, i), d, 32'(snap[k % 4][i]));
      end
    end
    check("dropped accepts", 32'(dropped), 1);
    streaming = 1'b0;
    repeat (3) @(negedge clk);
    // read the circular buffer: the last DEPTH words, position = index mod DEPTH
    for (int i = hist.size() - DEPTH; i < hist.size(); i += 7) begin
      hread(16'h2400 + 16'(i % DEPTH), d);
      check($sformatf("circ %0d", i % DEPTH), d, 32'(hist[i]));
    end
    // read only
    hread(16'h2105, d);
    hwrite(16'h2105, ~d);
    begin
      logic [31:0] d2;
      hread(16'h2105, d2); check("buffers read only", d2, d);
    end
    hread(16'h204A, d); check("past buffer end", d, 0);
    hread(16'h2680, d); check("past circular end", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
