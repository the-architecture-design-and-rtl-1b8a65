// cmac3: complex multiply-accumulate with three multipliers.
//
// The processing element of the massive correlator. It accumulates
// z * conj(x) over a waveform. Writing z = a + jb and conj(x) = c + jd'
// (d' = -Im x), the product is formed with three real multiplications,
//     k1 = c (a + b),  k2 = a (d' - c),  k3 = b (c + d')
//     Re = k1 - k3,    Im = k1 + k2,
// trading the fourth multiplier for two extra adders.
// Pipeline: stage 1 pre-adders, stage 2 multipliers, stage 3 post-adders,
// then the accumulator register. An operand presented with `en` is in
// acc_i/acc_q four clocks later; `clr` with an operand restarts the sum at
// that product. Three multipliers and a three-stage pipeline follow the
// design; the exact arrangement of the adders is this implementation's.
module cmac3 #(
  parameter int DATA_W = 16,
  parameter int ACC_W  = 48
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     clr,
  input  logic signed [DATA_W-1:0] z_i,
  input  logic signed [DATA_W-1:0] z_q,
  input  logic signed [DATA_W-1:0] x_i,
  input  logic signed [DATA_W-1:0] x_q,
  output logic signed [ACC_W-1:0]  acc_i,
  output logic signed [ACC_W-1:0]  acc_q
);

  localparam int SW = DATA_W + 2;  // -xq-xi reaches +2^DATA_W
  localparam int MW = DATA_W + SW;

  logic                     en1, en2, en3, clr1, clr2, clr3;
  logic signed [DATA_W-1:0] a1, b1, c1;
  logic signed [SW-1:0]     s_ab, s_dc, s_cd;
  logic signed [MW-1:0]     k1, k2, k3;
  logic signed [MW:0]       re3, im3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {en1, en2, en3}    <= '0;
      {clr1, clr2, clr3} <= '0;
    end else begin
      {en1, en2, en3}    <= {en, en1, en2};
      {clr1, clr2, clr3} <= {clr, clr1, clr2};
    end
  end

  always_ff @(posedge clk) begin
    // stage 1
    a1   <= z_i;
    b1   <= z_q;
    c1   <= x_i;
    s_ab <= SW'(z_i) + SW'(z_q);
    s_dc <= -SW'(x_q) - SW'(x_i);
    s_cd <= SW'(x_i) - SW'(x_q);
    // stage 2
    k1 <= MW'(c1) * MW'(s_ab);
    k2 <= MW'(a1) * MW'(s_dc);
    k3 <= MW'(b1) * MW'(s_cd);
    // stage 3
    re3 <= (MW+1)'(k1) - (MW+1)'(k3);
    im3 <= (MW+1)'(k1) + (MW+1)'(k2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i <= '0;
      acc_q <= '0;
    end else if (en3) begin
      acc_i <= clr3 ? ACC_W'(re3) : acc_i + ACC_W'(re3);
      acc_q <= clr3 ? ACC_W'(im3) : acc_q + ACC_W'(im3);
    end
  end

endmodule
