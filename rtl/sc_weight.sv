// sc_weight: one synaptic weight magnitude with its encoder and update counter.
//
// The 8-bit register holds the weight as a probability w/256; a comparator
// against the column's random number turns it into the weight stream. During
// a training pass the 9-bit up/down counter integrates the gradient streams
// (up = increase, dn = decrease); when apply is pulsed the register takes
// w + count, clipped to 0..255, so one pass moves the weight by about
// eta*gradient in probability units. A host write replaces the register.
// The 8-bit register and 9-bit counter are from the description; the
// "add the decoded count" update and the clipping are this design's choice.
// Timing: w_bit is combinational from w and rnd; w changes on the clock edge
// of apply or wr_en (wr_en has priority); clr zeroes the counter.
module sc_weight import sc_pkg::*; #(
  parameter val_t INIT = 8'd0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,      // start of a pass: zero the update counter
  input  logic en,       // stream cycle
  input  val_t rnd,      // column random number
  input  logic up,       // gradient stream, increase
  input  logic dn,       // gradient stream, decrease
  input  logic apply,    // end of a training pass: add the count
  input  logic wr_en,
  input  val_t wr_data,
  output val_t w,
  output logic w_bit
);
  cnt_t count;

  ud_counter u_cnt (
    .clk, .rst_n, .clr, .en, .up, .dn, .count
  );

  sng u_sng (.value(w), .rnd, .bit_o(w_bit));

  logic signed [CNT_W:0] sum;
  val_t w_next;
  always_comb begin
    sum = $signed({2'b00, w}) + (CNT_W + 1)'(count);
    if (sum < 0)                 w_next = '0;
    else if (sum > 255)          w_next = '1;
    else                         w_next = sum[VAL_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      w <= INIT;
    else if (wr_en)  w <= wr_data;
    else if (apply)  w <= w_next;
  end
endmodule
