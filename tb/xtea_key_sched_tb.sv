// xtea_key_sched_tb: runs the key schedule through full encryption and
// decryption phase sequences (32 cycles, 4 phases each) with random keys and
// compares every round key with the sum/sub-key rule of XTEA.
module xtea_key_sched_tb;
  import xtea_pkg::*;
  logic clk = 0, rst = 1, init = 0, ed = 0, en = 0;
  phase_e phase = PH_KEY0;
  logic [127:0] key;
  logic [31:0] kout;
  int checks = 0, failures = 0;
  localparam logic [31:0] D = 32'h9E3779B9;

  xtea_key_sched #(.CYCLES(32)) dut (.clk, .rst, .init, .ed, .en, .phase, .key, .kout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] sub(input logic [127:0] k, input logic [1:0] i);
    return k[i*32 +: 32];
  endfunction

  task automatic run(input bit dir);
    logic [31:0] s, e;
    @(negedge clk); ed = dir; init = 1;
    @(negedge clk); init = 0; en = 1;
    s = dir ? D * 32 : 0;
    for (int c = 0; c < 32; c++) begin
      for (int p = 0; p < 4; p++) begin
        phase = phase_e'(p);
        @(negedge clk);
        if (p == 0) begin
          e = dir ? s + sub(key, s[12:11]) : s + sub(key, s[1:0]);
          s = dir ? s - D : s + D;
        end else if (p == 2) begin
          e = dir ? s + sub(key, s[1:0]) : s + sub(key, s[12:11]);
        end
        if (p == 0 || p == 2) begin
          checks++;
          if (kout !== e) begin
            failures++;
            $display("FAIL dir=%0d cycle=%0d phase=%0d kout=%h exp=%h", dir, c, p, kout, e);
          end
        end
      end
    end
    en = 0;
  endtask

  initial begin
    key = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 6; t++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      run(t[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
