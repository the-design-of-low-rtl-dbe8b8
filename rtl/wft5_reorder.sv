// wft5_reorder: five-sample reorder buffer with its address generator.
//
// Turns a stream of five-sample blocks into the same blocks with the samples
// permuted: out[j] = in[PERM[j]]. It is a ping-pong buffer of two banks of
// five complex words: while one bank is written in arrival order (address =
// counter value - 1), the other is read at the addresses PERM. Banks swap
// after counter value 5, so each block leaves exactly five clocks after it
// arrived and keeps its alignment with the counter. The default PERM takes
// natural order x0..x4 to the feeding order x0, x1, x2, x4, x3 of the WFT
// pipeline. The design only names the input buffer and its address
// generator; the ping-pong form is this design's own.
//
// Interface: din/dout are W-bit complex parts; dout is read combinationally
// from the buffer registers.
module wft5_reorder #(
  parameter int W = 11,
  parameter int N = 5,
  parameter int unsigned PERM [N] = '{0, 1, 2, 4, 3}
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2:0]          phase,      // 1..N
  input  logic signed [W-1:0] din_re,
  input  logic signed [W-1:0] din_im,
  output logic signed [W-1:0] dout_re,
  output logic signed [W-1:0] dout_im
);

  logic signed [W-1:0] mem_re [2][N];
  logic signed [W-1:0] mem_im [2][N];
  logic                wbank;
  logic [2:0]          waddr;
  logic [2:0]          raddr;

  assign waddr = phase - 3'd1;
  assign raddr = 3'(PERM[waddr]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbank <= 1'b0;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < N; i++) begin
          mem_re[b][i] <= '0;
          mem_im[b][i] <= '0;
        end
    end else begin
      mem_re[wbank][waddr] <= din_re;
      mem_im[wbank][waddr] <= din_im;
      if (phase == 3'(N)) wbank <= ~wbank;
    end
  end

  assign dout_re = mem_re[~wbank][raddr];
  assign dout_im = mem_im[~wbank][raddr];

  // Every permutation entry must address a slot of the buffer.
  a_perm_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 int'(raddr) < N);

endmodule
