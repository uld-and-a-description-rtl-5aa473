// pdp8_shift: the shift register used for rotations of link and accumulator.
//
// A rotation takes two event times. In the first (ac_shift) the link and the
// accumulator are copied in parallel into this thirteen-bit register, each bit
// landing one place (or two, with rot_two) to the left or the right of where
// it came from, the link taking part as bit -1 of a thirteen-bit ring. In the
// second the accumulator module copies the register straight back (shift_ac).
// q is ordered {link, AC[0:11]}. A request to rotate both ways at once is not
// allowed; it loads the register unrotated. Reset clears the register.
module pdp8_shift
  import pdp8_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  ctl_t         ctl,
  input  word_t        ac,
  input  logic         link,
  output logic [0:12]  q
);

  logic [0:12] ring;
  logic [0:12] rotated;

  assign ring = {link, ac};

  always_comb begin
    rotated = ring;
    if (ctl.rot_left && !ctl.rot_right)
      rotated = ctl.rot_two ? {ring[2:12], ring[0:1]} : {ring[1:12], ring[0]};
    else if (ctl.rot_right && !ctl.rot_left)
      rotated = ctl.rot_two ? {ring[11:12], ring[0:10]} : {ring[12], ring[0:11]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            q <= '0;
    else if (ctl.ac_shift) q <= rotated;
  end

endmodule
