// tb_zpd_lut_bank: with the Fitter's 23-table default, writes the first,
// the last and random entries of every table through the host port (32-bit
// data), reads them back through the host port and through the algorithm
// read port, and checks table widths (16 bits except sumd2s2 at 0x3100),
// that addresses between tables read 0 and that entries past a table's end
// read 0 on the algorithm port. Table ranges are listed again here.
module tb_zpd_lut_bank;
  import zpd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  host_req_t req;
  logic sel;
  logic [4:0] lut_sel;
  logic [15:0] lut_idx;
  logic [31:0] lut_data;
  logic [DATA_W-1:0] rdata;

  zpd_lut_bank dut (.clk, .rst_n, .lut_sel, .lut_idx, .lut_data, .req, .sel, .rdata);

  // phiconv .. z0err
  int base [23] = '{'h100, 'h200, 'h300, 'h500, 'h600, 'h800, 'h900, 'h1100, 'h1900, 'h2100,
                    'h2200, 'h2400, 'h2600, 'h2900, 'h2A00, 'h2B00, 'h2C00, 'h2D00, 'h2E00,
                    'h2F00, 'h3100, 'h3300, 'h3500};
  int last [23] = '{'h108, 'h208, 'h41F, 'h508, 'h71F, 'h83F, 'h10FF, 'h18FF, 'h20FF, 'h21BF,
                    'h23FF, 'h25FF, 'h283F, 'h293F, 'h2A3F, 'h2B05, 'h2C05, 'h2D2F, 'h2E2F,
                    'h30FF, 'h32FF, 'h34FF, 'h36FF};

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

  task automatic aread(int t, int idx, output logic [31:0] d);
    @(negedge clk);
    lut_sel = 5'(t); lut_idx = 16'(idx);
    @(negedge clk);
    d = lut_data;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] d, v;
  int idx [3];
  logic [31:0] val [23][3];
  initial begin
    req = '0; sel = 1'b1; lut_sel = '0; lut_idx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 23; t++) begin
      idx[0] = 0; idx[1] = last[t] - base[t]; idx[2] = $urandom_range(1, last[t] - base[t] - 1);
      for (int k = 0; k < 3; k++) begin
        val[t][k] = $urandom;
        hwrite(16'(base[t] + idx[k]), val[t][k]);
        if (t != 20) val[t][k] = val[t][k] & 32'hFFFF;
      end
      for (int k = 0; k < 3; k++) begin
        hread(16'(base[t] + idx[k]), d);
        check($sformatf("host t%0d entry %0d", t, idx[k]), d, val[t][k]);
        aread(t, idx[k], d);
        check($sformatf("alg t%0d entry %0d", t, idx[k]), d, val[t][k]);
      end
      aread(t, last[t] - base[t] + 1, d);
      check($sformatf("alg t%0d past end", t), d, 0);
    end
    hread(16'h0109, d); check("gap after phiconv", d, 0);
    hread(16'h3700, d); check("after z0err", d, 0);
    hread(16'h00FF, d); check("before phiconv", d, 0);
    sel = 1'b0;
    hread(16'h0100, d); check("not selected", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
