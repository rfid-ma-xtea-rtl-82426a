// rng64: 64-bit pseudo-random number generator used for the tag identity
// and the nonces RN1, RN2 and RN3 of the mutual authentication.
//
// A 64-bit Fibonacci LFSR with XNOR feedback from bits 63, 62, 60 and 59
// (taps 64,63,61,60, a maximal-length polynomial). With XNOR feedback the
// all-zero state is legal and the all-ones state is the lock-up state, so
// SEED must not be all ones. The register is loaded with SEED at reset and
// keeps its state between requests.
//
// Interface: pulse `req` while `busy` is low. The LFSR then shifts STEPS
// times, and `valid` pulses for one clock with the new number on `rn`,
// STEPS+1 clocks after the request; `rn` holds until the next request.
//
// The document names the generator and its 64-bit output but not how it
// works; the LFSR, its seed and step count are this design's choices.
// STEPS = 30 makes one number take about the 0.6 us the document reports at
// a 20 ns clock, and SEED = 0 gives 0x0000_0000_3FFF_FFFF.
module rng64 #(
  parameter logic [63:0] SEED  = 64'h0,
  parameter int unsigned STEPS = 30
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  output logic [63:0] rn,
  output logic        valid,
  output logic        busy
);

  localparam int unsigned SW = $clog2(STEPS + 1);

  logic [63:0]   lfsr;
  logic [SW-1:0] left;
  logic          fb;

  assign fb = ~(lfsr[63] ^ lfsr[62] ^ lfsr[60] ^ lfsr[59]);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      lfsr  <= SEED;
      left  <= '0;
      busy  <= 1'b0;
      valid <= 1'b0;
      rn    <= '0;
    end else begin
      valid <= 1'b0;
      if (!busy) begin
        if (req) begin
          busy <= 1'b1;
          left <= SW'(STEPS);
        end
      end else if (left != '0) begin
        lfsr <= {lfsr[62:0], fb};
        left <= left - 1'b1;
      end else begin
        busy  <= 1'b0;
        valid <= 1'b1;
        rn    <= lfsr;
      end
    end
  end

endmodule
