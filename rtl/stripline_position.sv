// stripline_position: beam position from two opposite stripline electrodes.
//
// Implements the difference-over-sum algorithm x = k * (V_A - V_C)/(V_A + V_C).
// |V_A - V_C| and V_A + V_C go to a sequential fixed-point divider; the ratio
// (FRAC fractional bits) is multiplied by the geometry factor k and the
// sign of V_A - V_C is applied. The position is in whatever unit k is given
// in, per unit of ratio (e.g. k in nm gives x in nm). The algorithm and the
// k factor are from the design; formats, rounding (truncation toward zero)
// and the zero-sum behaviour (ratio saturates, `div0` flagged) are this
// implementation's choice.
//
// Timing: pos_valid pulses AMP_W + 1 + FRAC + 3 cycles after start.
module stripline_position
  import bpm_pkg::*;
#(
  parameter int unsigned AMP_W = 21,
  parameter int unsigned K_W   = 32,
  parameter int unsigned POS_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [AMP_W-1:0]        va,
  input  logic [AMP_W-1:0]        vc,
  input  logic [K_W-1:0]          k,
  output logic                    pos_valid,
  output logic signed [POS_W-1:0] pos,
  output logic [FRAC:0]           ratio,     // |delta/sigma|, 1.FRAC
  output logic                    div0
);

  localparam int unsigned SW = AMP_W + 1;

  logic [SW-1:0]       delta, sigma;
  logic                neg, neg_q;
  logic                div_done;
  logic [SW+FRAC-1:0]  quot;
  logic [FRAC:0]       q_sat;
  logic [K_W+FRAC:0]   prod;
  logic                prod_valid;

  assign sigma = SW'(va) + SW'(vc);
  assign neg   = (vc > va);
  assign delta = neg ? SW'(vc - va) : SW'(va - vc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) neg_q <= 1'b0;
    else if (start) neg_q <= neg;
  end

  seq_divider #(.NUM_W(SW), .DEN_W(SW), .FRAC(FRAC)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .num   (delta),
    .den   (sigma),
    .busy  (),
    .done  (div_done),
    .div0  (div0),
    .quot  (quot)
  );

  // |delta| <= sigma, so the ratio never exceeds 1.0 except for div0
  assign q_sat = (quot > (SW+FRAC)'(1 << FRAC)) ? (FRAC+1)'(1 << FRAC) : quot[FRAC:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod       <= '0;
      prod_valid <= 1'b0;
      pos_valid  <= 1'b0;
      pos        <= '0;
      ratio      <= '0;
    end else begin
      prod_valid <= div_done;
      pos_valid  <= prod_valid;
      if (div_done) begin
        prod  <= q_sat * k;
        ratio <= q_sat;
      end
      if (prod_valid) begin
        pos <= neg_q ? -POS_W'(prod >> FRAC) : POS_W'(prod >> FRAC);
      end
    end
  end

endmodule
