// vsr -- video shift register of a GLiTCH chip: 64 stages of 8 bits, one
// per PE.
//
// Pixels enter at stage 0 (the first PE) and move one stage towards stage 63
// on every shift; the pixel leaving stage 63 is the video output, which feeds
// the next chip's input.  Shifting runs independently of PE computation, so
// a new line streams in while the old line streams out and the PEs work on
// the current one.  A load (ld) replaces all 64 stages at once with the bytes
// read from the CAMs; if shift and ld coincide, ld wins.
//
// Timing: one stage per clock with shift high; ld takes one clock.
// From the design: 64x8 size, concurrent in/out shifting.  Own choices:
// shifting is a clock enable of the system clock (no separate video clock
// domain), and the ld port used for the parallel CAM exchange.
module vsr
  import apa_pkg::*;
#(
  parameter int unsigned DEPTH = N_PE
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          shift,
  input  logic [PIX_W-1:0]              vin,
  output logic [PIX_W-1:0]              vout,
  input  logic                          ld,
  input  logic [DEPTH-1:0][PIX_W-1:0]   ld_data,
  output logic [DEPTH-1:0][PIX_W-1:0]   q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (ld) q <= ld_data;
    else if (shift) begin
      q[0] <= vin;
      for (int i = 1; i < int'(DEPTH); i++) q[i] <= q[i-1];
    end
  end

  assign vout = q[DEPTH-1];

endmodule
