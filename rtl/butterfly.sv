// butterfly: the shared pre-/post-processing butterfly of the 1D unit,
// built from operand multiplexers and a single adder/subtractor.
//
// The unit is used serially, one result per cycle, step = 0..7:
//   forward (post = 0), on the input samples v = x0..x7:
//     step 0..3: y = x(s)     + x(7-s)       (even-half inputs a0..a3)
//     step 4..7: y = x(s-4)   - x(11-s)      (odd-half inputs  d0..d3)
//   inverse (post = 1), on v = {e0..e3, o0..o3} from the ROM accumulators:
//     step 0..3: y = e(s)     + o(s)         (outputs x0..x3)
//     step 4..7: y = e(7-s)   - o(7-s)       (outputs x4..x7)
// In the forward direction the butterfly sits in front of the ROM tables,
// in the inverse direction behind them, as the published design describes.
// The add/subtract choice is step bit 2. One adder and operand muxes is the
// published structure; the exact mux arrangement is this design's.
// Interface: combinational; the caller holds v stable and steps s.
module butterfly (
  input  logic                          post,
  input  logic [2:0]                    step,
  input  logic signed [dct_pkg::AW-1:0] v [8],
  output logic signed [dct_pkg::AW-1:0] y
);
  import dct_pkg::AW;

  logic [2:0] ia, ib;
  logic       sub;
  logic       unused_cout;

  always_comb begin
    sub = step[2];
    if (!post) begin
      ia = sub ? step - 3'd4 : step;
      ib = sub ? 3'd3 - (step - 3'd4) + 3'd4 : 3'd7 - step;
    end else begin
      ia = sub ? 3'd7 - step : step;
      ib = sub ? 3'd4 + (3'd7 - step) : 3'd4 + step;
    end
  end

  ci_adder u_add (.a(v[ia]), .b(v[ib]), .sub(sub), .sum(y), .cout(unused_cout));
endmodule
