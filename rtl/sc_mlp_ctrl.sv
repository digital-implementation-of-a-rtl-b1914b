// sc_mlp_ctrl: sequencer of one stream pass.
//
// A start pulse in IDLE issues clr for one cycle (zeroing every decoder and
// activation history) and enters RUN, where en is high for exactly L = 255
// cycles so every LFSR walks one full period. FINISH then lasts one cycle:
// done is high, and for a training pass apply is high so every weight adds
// its accumulated update on that clock edge. The pass therefore takes L + 1
// cycles after the start cycle, the same for training and inference.
// The description fixes L = 255; the three-phase sequence is this design's.
// Interface: start is sampled only in IDLE; train is captured with it.
module sc_mlp_ctrl import sc_pkg::*; #(
  parameter int unsigned L = STREAM_L
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic train,
  output logic clr,
  output logic en,
  output logic apply,
  output logic busy,
  output logic done
);
  localparam int unsigned CW = $clog2(L + 1);

  phase_e          state;
  logic [CW-1:0]   cyc;
  logic            train_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      cyc     <= '0;
      train_q <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          state   <= ST_RUN;
          cyc     <= '0;
          train_q <= train;
        end
        ST_RUN: begin
          cyc <= cyc + CW'(1);
          if (cyc == CW'(L - 1)) state <= ST_FINISH;
        end
        ST_FINISH: state <= ST_IDLE;
        default:   state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    clr   = (state == ST_IDLE) && start;
    en    = (state == ST_RUN);
    done  = (state == ST_FINISH);
    apply = done && train_q;
    busy  = (state != ST_IDLE);
  end

  // A pass always ends in FINISH after L RUN cycles.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == ST_RUN && cyc == CW'(L - 1)) |=> (state == ST_FINISH));
endmodule
