// zpd_lut_bank: the look-up tables of a Finder or a Fitter.
//
// A board's algorithms read constants from host-loaded tables. Table t sits
// at host word addresses BASE[t]..LAST[t]; it is 32 bits wide when WIDE[t]
// is set and 16 bits otherwise. The default list is the Fitter's 23 tables
// (phiconv at 0x100 .. z0err at 0x3500); the Finder uses two (seed phi SL
// conversion at 0x8000, expected phi position at 0xC000, 32 bits). The
// ranges and widths are the crate's; the contents belong to the algorithms
// and are loaded by the host.
//
// Each table is its own RAM with a host port (read/write) and a read port
// for the board's algorithm: 'lut_sel' picks the table, 'lut_idx' the entry
// counted from the table's base; 'lut_data' follows one cycle later.
// Entries past a table's end read as 0.
//
// Timing: host read data one cycle after the request (0 when not read).
module zpd_lut_bank
  import zpd_pkg::*;
#(
  parameter int unsigned             N    = 23,
  parameter logic [N-1:0][15:0]      BASE = {16'h3500, 16'h3300, 16'h3100, 16'h2F00, 16'h2E00,
                                             16'h2D00, 16'h2C00, 16'h2B00, 16'h2A00, 16'h2900,
                                             16'h2600, 16'h2400, 16'h2200, 16'h2100, 16'h1900,
                                             16'h1100, 16'h0900, 16'h0800, 16'h0600, 16'h0500,
                                             16'h0300, 16'h0200, 16'h0100},
  parameter logic [N-1:0][15:0]      LAST = {16'h36FF, 16'h34FF, 16'h32FF, 16'h30FF, 16'h2E2F,
                                             16'h2D2F, 16'h2C05, 16'h2B05, 16'h2A3F, 16'h293F,
                                             16'h283F, 16'h25FF, 16'h23FF, 16'h21BF, 16'h20FF,
                                             16'h18FF, 16'h10FF, 16'h083F, 16'h071F, 16'h0508,
                                             16'h041F, 16'h0208, 16'h0108},
  parameter logic [N-1:0]            WIDE = N'(1) << 20       // sumd2s2 is 32 bits wide
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // algorithm read port
  input  logic [$clog2(N)-1:0]  lut_sel,
  input  logic [15:0]           lut_idx,
  output logic [31:0]           lut_data,
  // host side
  input  host_req_t             req,
  input  logic                  sel,
  output logic [DATA_W-1:0]     rdata
);

  logic [N-1:0][31:0] host_q, alg_q;
  logic [N-1:0]       host_hit_q;

  for (genvar t = 0; t < N; t++) begin : g_lut
    localparam int unsigned DEPTH = int'(LAST[t]) - int'(BASE[t]) + 1;
    localparam int unsigned WD    = WIDE[t] ? 32 : 16;
    localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

    logic [WD-1:0] mem [DEPTH];
    logic [15:0]   h_off;
    logic          h_hit;
    logic          a_ok;

    always_comb begin
      h_off = req.addr - BASE[t];
      h_hit = sel && req.addr >= BASE[t] && req.addr <= LAST[t];
      a_ok  = 32'(lut_idx) < DEPTH;
    end

    always_ff @(posedge clk) begin
      if (h_hit && req.we) mem[h_off[AW-1:0]] <= req.wdata[WD-1:0];
      host_q[t] <= h_hit ? 32'(mem[h_off[AW-1:0]]) : '0;
      alg_q[t]  <= (a_ok && lut_sel == $clog2(N)'(t)) ? 32'(mem[lut_idx[AW-1:0]]) : '0;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) host_hit_q[t] <= 1'b0;
      else        host_hit_q[t] <= h_hit && req.re;
    end
  end

  always_comb begin
    rdata    = '0;
    lut_data = '0;
    for (int t = 0; t < N; t++) begin
      if (host_hit_q[t]) rdata = rdata | DATA_W'(host_q[t]);
      lut_data = lut_data | alg_q[t];
    end
  end

endmodule
