// golay_decoder: decoder of the (24,12) extended Golay code. Corrects any
// pattern of up to three bit errors and flags four-bit errors.
//
// Input layout: r = {message[11:0], check[10:0], parity}. The code is
// systematic, c = [m, m*A], where row i of the 12x12 matrix A holds the 11
// CRC check bits and the parity bit produced by message bit i alone. A is
// computed at elaboration from GOLAY_POLY. For the extended Golay code
// A*A^T = I, which the search below relies on.
//
// Step 1 (error detection, as the document describes): recompute the check
// bits of the received message and XOR them with the received ones. This
// 12-bit syndrome s = r1*A + r2 is zero for a codeword.
// Step 2 (error correction): find the error pattern e = [e1, e2] of weight
// <= 3. Weight measurement units test, in parallel,
//   w(s) <= 3                     -> e = [0, s]
//   w(s ^ A[i]) <= 2 for some i   -> e = [u_i, s ^ A[i]]
//   t = s*A^T; w(t) <= 3          -> e = [t, 0]
//   w(t ^ A^T[j]) <= 2 for some j -> e = [t ^ A^T[j], u_j]
// and the first that holds is taken; code_out is r with e applied and msg
// its upper 12 bits. If none holds, at least four bits are
// wrong and err_uncorrectable is raised; the message is passed through.
//
// Fully combinational (26 weight units). The detection step and the use of
// weight units follow the document; the two-syndrome search is the standard
// extended-Golay algorithm chosen by this design, as the document does not
// detail the search.
module golay_decoder
  import golay_pkg::*;
#(
  parameter logic [11:0] GOLAY_POLY = GOLAY_POLY_DEFAULT
) (
  input  logic [23:0] r,
  output logic [11:0] msg,
  output logic        err_detected,
  output logic        err_corrected,
  output logic        err_uncorrectable,
  output logic [2:0]  err_weight,
  output logic [23:0] code_out
);

  localparam mat12_t A  = parity_matrix(GOLAY_POLY);
  localparam mat12_t AT = transpose12(A);

  logic [11:0] r1, r2;
  logic [11:0] s, t;
  logic [11:0] cand_a [12];
  logic [11:0] cand_b [12];
  logic [3:0]  ws, wt;
  logic [3:0]  wa [12];
  logic [3:0]  wb [12];

  assign r1 = r[23:12];
  assign r2 = r[11:0];

  // Syndrome: received check bits XOR check bits recomputed from r1.
  always_comb begin
    s = r2;
    for (int i = 0; i < 12; i++)
      if (r1[i]) s = s ^ A[i];
  end

  // Second syndrome t = s * A^T.
  always_comb begin
    for (int j = 0; j < 12; j++)
      t[j] = ^(s & A[j]);
  end

  always_comb begin
    for (int i = 0; i < 12; i++) begin
      cand_a[i] = s ^ A[i];
      cand_b[i] = t ^ AT[i];
    end
  end

  weight_unit u_ws (.v(s), .w(ws));
  weight_unit u_wt (.v(t), .w(wt));

  for (genvar g = 0; g < 12; g++) begin : g_weights
    weight_unit u_wa (.v(cand_a[g]), .w(wa[g]));
    weight_unit u_wb (.v(cand_b[g]), .w(wb[g]));
  end

  logic [11:0] e1, e2;
  logic        found;
  logic [2:0]  wsum;

  always_comb begin
    e1    = '0;
    e2    = '0;
    found = 1'b0;
    wsum  = '0;
    if (ws <= 4'd3) begin
      e2    = s;
      found = 1'b1;
      wsum  = ws[2:0];
    end else begin
      for (int i = 0; i < 12; i++) begin
        if (!found && wa[i] <= 4'd2) begin
          e1[i] = 1'b1;
          e2    = cand_a[i];
          found = 1'b1;
          wsum  = 3'(wa[i] + 4'd1);
        end
      end
      if (!found && wt <= 4'd3) begin
        e1    = t;
        found = 1'b1;
        wsum  = wt[2:0];
      end
      for (int j = 0; j < 12; j++) begin
        if (!found && wb[j] <= 4'd2) begin
          e1    = cand_b[j];
          e2[j] = 1'b1;
          found = 1'b1;
          wsum  = 3'(wb[j] + 4'd1);
        end
      end
    end
  end

  assign err_detected      = (s != '0);
  assign err_corrected     = err_detected && found;
  assign err_uncorrectable = err_detected && !found;
  assign err_weight        = found ? wsum : 3'd0;
  assign msg               = r1 ^ e1;
  assign code_out          = r ^ {e1, e2};

endmodule
