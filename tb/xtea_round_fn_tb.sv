// xtea_round_fn_tb: checks the XTEA round function against arithmetic
// written with multiplies and divides instead of shifts, on fixed corner
// values and 2000 random pairs.
module xtea_round_fn_tb;
  logic [31:0] rin, kout, rout;
  int checks = 0, failures = 0;

  xtea_round_fn dut (.rin(rin), .kout(kout), .rout(rout));

  task automatic check_one(input logic [31:0] r, input logic [31:0] k);
    logic [31:0] exp;
    rin = r; kout = k;
    #1;
    exp = k ^ (((r * 32'd16) ^ (r / 32'd32)) + r);
    checks++;
    if (rout !== exp) begin
      failures++;
      $display("FAIL rin=%h kout=%h rout=%h exp=%h", r, k, rout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'h0, 32'h0);
    check_one(32'hFFFF_FFFF, 32'h0);
    check_one(32'h8000_0001, 32'hDEAD_BEEF);
    check_one(32'h0000_0020, 32'h0);   // only the >>5 path sees bit 5
    for (int i = 0; i < 2000; i++) check_one($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
