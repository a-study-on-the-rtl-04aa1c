// dpu_1d: 8-point 1D DCT or IDCT processing unit (8x1 DCT/IDCT).
//
// Forward: eight 16-bit samples x0..x7 are latched on start. The butterfly
// forms a(n) = x(n)+x(7-n) and d(n) = x(n)-x(7-n) in 8 cycles (PRE). The a
// words feed four even DA units (z0, z2, z4, z6), the d words four odd DA
// units (z1, z3, z5, z7). The eight units then work bit-serially for 16
// cycles (DA), one bit of every word per cycle, LSB first, sign bit
// subtracted. In OUT the eight sums are scaled and sent out one per cycle in
// the order z0..z7.
// Inverse: the coefficients Z0..Z7 go straight into the DA units (even
// Z0, Z2, Z4, Z6 and odd Z1, Z3, Z5, Z7); the butterfly runs after them in
// OUT, producing x0..x7 one per cycle.
// Scaling: forward result = round(sum / 2^11) (the 2/N factor is left out),
// inverse result = round(sum / 2^13) (2/N included, so the inverse undoes
// the forward transform); both saturate to 16 bits.
// Even/odd split, DA units, butterfly before the ROMs for DCT and after them
// for IDCT follow the published design; the phase sequencing, scaling and
// output order are this design's.
// Interface: start is accepted when ready = 1 and latches x and dct
// (1 = DCT, 0 = IDCT). Results appear on out_data with out_valid and
// out_idx; out_last marks the eighth.
// Timing: DCT: first result 26 cycles after the start cycle, last at 33.
// IDCT: first at 18, last at 25. ready returns the cycle after out_last.
// In the forward direction a(n) and d(n) are kept to 16 bits, so inputs
// must stay within +/-2^14 to avoid wrap-around.
module dpu_1d (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic                           dct,
  input  logic signed [dct_pkg::DW-1:0]  x [8],
  output logic                           ready,
  output logic                           out_valid,
  output logic [2:0]                     out_idx,
  output logic                           out_last,
  output logic signed [dct_pkg::DW-1:0]  out_data
);
  import dct_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DA, S_OUT} state_t;

  state_t                state;
  logic                  mode;           // latched dct
  logic [3:0]            cnt;
  logic signed [AW-1:0]  xr   [8];       // butterfly operand register
  logic [DW-1:0]         lane [8];       // DA shift registers: 0..3 even, 4..7 odd
  logic signed [AW-1:0]  acc  [8];       // 0..3 even units, 4..7 odd units
  logic signed [AW-1:0]  bf_v [8];
  logic signed [AW-1:0]  bf_y;
  logic [3:0]            addr_e, addr_o;
  logic signed [AW-1:0]  pick, rounded;
  logic signed [DW-1:0]  sat;

  assign ready = (state == S_IDLE);

  // Butterfly operands: samples in PRE, accumulator results in OUT.
  always_comb
    for (int i = 0; i < 8; i++) bf_v[i] = (state == S_OUT) ? acc[i] : xr[i];

  butterfly u_bf (.post(state == S_OUT), .step(cnt[2:0]), .v(bf_v), .y(bf_y));

  // ROM addresses: bit 3 from word 0 ... bit 0 from word 3.
  assign addr_e = {lane[0][0], lane[1][0], lane[2][0], lane[3][0]};
  assign addr_o = {lane[4][0], lane[5][0], lane[6][0], lane[7][0]};

  for (genvar k = 0; k < 4; k++) begin : g_da
    da_unit #(.K(k), .IS_ODD(1'b0), .B(DW)) u_even (
      .clk, .rst_n, .dct(mode), .en(state == S_DA), .first(cnt == 4'd0),
      .msb(cnt == 4'(DW-1)), .bitpos(cnt), .addr(addr_e), .acc(acc[k]));
    da_unit #(.K(k), .IS_ODD(1'b1), .B(DW)) u_odd (
      .clk, .rst_n, .dct(mode), .en(state == S_DA), .first(cnt == 4'd0),
      .msb(cnt == 4'(DW-1)), .bitpos(cnt), .addr(addr_o), .acc(acc[4+k]));
  end

  // Output word: forward takes accumulator z(i) (even unit i/2 or odd unit
  // i/2), inverse takes the butterfly result.
  always_comb begin
    if (mode) pick = cnt[0] ? acc[4 + int'(cnt[2:1])] : acc[int'(cnt[2:1])];
    else      pick = bf_y;
    if (mode) rounded = (pick + (AW'(1) <<< (SH_DCT - 1)))  >>> SH_DCT;
    else      rounded = (pick + (AW'(1) <<< (SH_IDCT - 1))) >>> SH_IDCT;
    if (rounded > AW'(signed'(16'sh7fff)))       sat = 16'sh7fff;
    else if (rounded < AW'(signed'(16'sh8000)))  sat = 16'sh8000;
    else                                         sat = rounded[DW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mode      <= 1'b1;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
      for (int i = 0; i < 8; i++) begin
        xr[i]   <= '0;
        lane[i] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          mode <= dct;
          cnt  <= '0;
          if (dct) begin
            for (int i = 0; i < 8; i++) xr[i] <= AW'(x[i]);
            state <= S_PRE;
          end else begin
            for (int i = 0; i < 4; i++) begin
              lane[i]   <= x[2*i];
              lane[4+i] <= x[2*i+1];
            end
            state <= S_DA;
          end
        end
        S_PRE: begin
          lane[cnt[2:0]] <= bf_y[DW-1:0];
          cnt <= cnt + 4'd1;
          if (cnt == 4'd7) begin
            cnt   <= '0;
            state <= S_DA;
          end
        end
        S_DA: begin
          for (int i = 0; i < 8; i++) lane[i] <= lane[i] >> 1;
          cnt <= cnt + 4'd1;
          if (cnt == 4'(DW-1)) begin
            cnt   <= '0;
            state <= S_OUT;
          end
        end
        S_OUT: begin
          out_valid <= 1'b1;
          out_idx   <= cnt[2:0];
          out_data  <= sat;
          cnt       <= cnt + 4'd1;
          if (cnt == 4'd7) begin
            out_last <= 1'b1;
            cnt      <= '0;
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
