// tb_zpd_host_port: checks block selection (one-hot IDs and group masks)
// and the Version / Control / Status / reserved registers, including the
// one-cycle read latency.
module tb_zpd_host_port;
  import zpd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  host_req_t req;
  logic [15:0] status;
  logic sel;
  logic [15:0] control;
  logic [DATA_W-1:0] rdata;

  // Finder 4: block bit 0x200
  zpd_host_port #(.ID(16'h0200), .VERSION(16'h0123)) dut (
    .clk, .rst_n, .req, .status, .sel, .control, .rdata
  );

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic hwrite(logic [15:0] blk, logic [15:0] addr, logic [31:0] d);
    @(negedge clk);
    req = '0; req.blk = blk; req.addr = addr; req.wdata = d; req.we = 1'b1;
    @(negedge clk);
    req = '0;
  endtask

  task automatic hread(logic [15:0] blk, logic [15:0] addr, output logic [31:0] d);
    @(negedge clk);
    req = '0; req.blk = blk; req.addr = addr; req.re = 1'b1;
    @(negedge clk);
    d = rdata;
    req = '0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] d;
  initial begin
    req = '0;
    status = 16'h5A3C;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // selection
    req = '0; req.blk = 16'h0200; #1 check("sel own id", 32'(sel), 1);
    req.blk = BLK_SL7_FINDERS;     #1 check("sel SL7 group", 32'(sel), 1);
    req.blk = BLK_ALL_FINDERS;     #1 check("sel all finders", 32'(sel), 1);
    req.blk = BLK_SL10_FINDERS;    #1 check("no sel SL10 group", 32'(sel), 0);
    req.blk = BLK_ALL_FITTERS;     #1 check("no sel fitters", 32'(sel), 0);
    req.blk = BLK_DM;              #1 check("no sel DM", 32'(sel), 0);
    req = '0;

    hread(16'h0200, A_VERSION, d); check("version", d, 32'h0123);
    hread(16'h0200, A_STATUS, d);  check("status", d, 32'h5A3C);
    hread(16'h0200, A_CONTROL, d); check("control reset", d, 0);
    hwrite(16'h0200, A_CONTROL, 32'hBEEF);
    check("control port", 32'(control), 32'hBEEF);
    hread(16'h0200, A_CONTROL, d); check("control readback", d, 32'hBEEF);
    // group write reaches this board
    hwrite(BLK_ALL_FINDERS, A_CONTROL, 32'h1234);
    hread(16'h0200, A_CONTROL, d); check("control group write", d, 32'h1234);
    // write to another board does not
    hwrite(16'h0800, A_CONTROL, 32'h7777);
    hread(16'h0200, A_CONTROL, d); check("control other board", d, 32'h1234);
    // read-only version
    hwrite(16'h0200, A_VERSION, 32'hFFFF);
    hread(16'h0200, A_VERSION, d); check("version read only", d, 32'h0123);
    // reserved and out-of-range words
    for (int a = 3; a < 16; a++) begin
      hread(16'h0200, 16'(a), d); check("reserved", d, 0);
    end
    hread(16'h0200, 16'h0012, d); check("not a register", d, 0);
    // unselected read returns nothing
    hread(16'h0800, A_VERSION, d); check("unselected read", d, 0);
    // latency: data present exactly one cycle after the request
    @(negedge clk);
    req = '0; req.blk = 16'h0200; req.addr = A_STATUS; req.re = 1'b1;
    #1 check("no data before edge", rdata, 0);
    @(negedge clk); req = '0;
    check("data after one edge", rdata, 32'h5A3C);
    @(negedge clk);
    check("data gone after two edges", rdata, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
