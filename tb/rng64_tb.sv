// rng64_tb: the LFSR generator against a bit-serial model: value, latency
// (STEPS+1 clocks) and a run of successive requests, for the default 30
// steps and for 60 steps. From an all-zero seed the XNOR LFSR shifts in ones,
// so 30 steps give 0x3FFFFFFF and 60 steps 0x0FFFFFFFFFFFFFFF.
module rng64_tb;
  import xtea_ref_pkg::*;
  logic clk = 0, rst = 1;
  logic req [3], valid [3], busy [3];
  logic [63:0] rn [3];
  int checks = 0, failures = 0;
  localparam logic [63:0] S2 = 64'h0123_4567_89AB_CDEF;

  rng64 #(.SEED(64'h0))          u0 (.clk, .rst, .req(req[0]), .rn(rn[0]), .valid(valid[0]), .busy(busy[0]));
  rng64 #(.SEED(64'h0), .STEPS(60)) u1 (.clk, .rst, .req(req[1]), .rn(rn[1]), .valid(valid[1]), .busy(busy[1]));
  rng64 #(.SEED(S2))             u2 (.clk, .rst, .req(req[2]), .rn(rn[2]), .valid(valid[2]), .busy(busy[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic get(input int u, input logic [63:0] exp, input int exp_lat);
    int lat;
    @(negedge clk);
    req[u] = 1;
    @(negedge clk);
    req[u] = 0;
    lat = 0;
    while (!valid[u]) begin @(negedge clk); lat++; end
    checks += 2;
    if (rn[u] !== exp) begin
      failures++;
      $display("FAIL unit=%0d rn=%h exp=%h", u, rn[u], exp);
    end
    if (lat != exp_lat) begin
      failures++;
      $display("FAIL unit=%0d latency %0d expected %0d", u, lat, exp_lat);
    end
  endtask

  initial begin
    logic [63:0] s;
    for (int i = 0; i < 3; i++) req[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    get(0, 64'h0000_0000_3FFF_FFFF, 31);
    get(1, 64'h0FFF_FFFF_FFFF_FFFF, 61);
    s = 64'h0000_0000_3FFF_FFFF;
    for (int i = 0; i < 20; i++) begin
      s = ref_lfsr(s, 30);
      get(0, s, 31);
    end
    s = S2;
    for (int i = 0; i < 20; i++) begin
      s = ref_lfsr(s, 30);
      get(2, s, 31);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
