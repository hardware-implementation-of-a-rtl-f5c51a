// dec_int: decoded integer message computation and stopping test.
//
// During the variable phase it stores the estimate w_v of every variable
// node (`w_we`). On `start` it sweeps the check nodes c = 0..N-1, one per
// cycle, and computes b_c = round(sum_j h_(c,j) * w_(col_j(c))), the rounded
// product of H with the estimate vector, as the document prescribes. Each
// b_c is compared with the value kept from the previous sweep and then
// replaces it; `changed` reports whether any b_c differed. `done` pulses
// one cycle after the last check node. The decoded vector can be read at
// any time through the combinational port rd_c / rd_b. Using an unchanged
// decision as the sign of success, which lets the controller stop early, is
// this design's choice: the document stops "as soon as decoding is
// successful" without saying how a receiver tells.
module dec_int
  import ldlc_pkg::*;
#(
  parameter int N  = 1000,
  parameter int AW = (N > 1) ? $clog2(N) : 1,
  parameter int BW = W - WF + 1                    // width of a decoded integer
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 w_we,
  input  logic [AW-1:0]        w_v,
  input  fx_t                  w_val,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic                 changed,
  output logic [AW-1:0]        rom_c,
  input  logic [AW-1:0]        rom_col [D],
  input  logic                 rom_neg [D],
  input  logic [AW-1:0]        rd_c,
  output logic signed [BW-1:0] rd_b
);

  fx_t                  wmem [N];
  logic signed [BW-1:0] bmem [N];
  logic [AW-1:0]        c;
  logic signed [BW-1:0] b_new;

  assign rom_c = c;
  assign rd_b  = bmem[rd_c];

  always_comb begin
    fx_t acc, t;
    acc = '0;
    for (int j = 0; j < D; j++) begin
      t   = qmul(HBAR[j], wmem[rom_col[j]]);
      acc = rom_neg[j] ? qsub(acc, t) : qadd(acc, t);
    end
    b_new = BW'((64'(acc) + 64'(1 << (WF - 1))) >>> WF);
  end

  always_ff @(posedge clk) begin
    if (w_we) wmem[w_v] <= w_val;
    if (busy) bmem[c]   <= b_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      changed <= 1'b0;
      c       <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy    <= 1'b1;
        changed <= 1'b0;
        c       <= '0;
      end else if (busy) begin
        if (b_new != bmem[c]) changed <= 1'b1;
        if (c == AW'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          c <= c + AW'(1);
        end
      end
    end
  end

endmodule
