// ud_counter: 9-bit up/down counter, the stream-to-binary decoder.
//
// Counts +1 for a cycle with up=1 and dn=0, -1 for dn=1 and up=0, and holds
// otherwise. With two streams of L = 255 cycles the difference lies in
// -255..255, which 9 signed bits hold; the count also saturates at the ends
// of its range so that longer windows cannot wrap. The 9-bit width is from
// the description; saturation and the synchronous clear are choices here.
// Timing: count is registered; clr (priority over en) zeroes it.
module ud_counter import sc_pkg::*; (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic up,
  input  logic dn,
  output cnt_t count
);
  localparam cnt_t MAXV = cnt_t'((1 << (CNT_W - 1)) - 1);
  localparam cnt_t MINV = cnt_t'(-(1 << (CNT_W - 1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (en) begin
      if (up && !dn && count != MAXV)      count <= count + cnt_t'(1);
      else if (dn && !up && count != MINV) count <= count - cnt_t'(1);
    end
  end
endmodule
