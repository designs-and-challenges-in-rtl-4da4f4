// loop_discriminators: code-loop and carrier-loop error signals from the
// six tracking accumulators, computed once per 1 ms dump.
//
// Code loop (DLL): non-coherent early-minus-late power,
//   dll_err = (IE^2 + QE^2) - (IL^2 + QL^2),
// positive when the early copy correlates better (local code late).
// Carrier loop, Costas type so that data bit flips do not disturb it:
//   PLL: pll_err = IP * QP           (product discriminator, ~sin(2*phase))
//   FLL: fll_err = sign(dot) * xprod (cross-product discriminator) with
//        xprod = IP[k-1]*QP[k] - QP[k-1]*IP[k], dot = IP[k-1]*IP[k] + QP[k-1]*QP[k].
// carr_err is fll_err while mode = 0 and pll_err once mode = 1; the
// receiver starts in FLL with wide loops and moves to the PLL with the
// narrowest loop bandwidth. That a DLL, an FLL and a Costas PLL are used,
// and the FLL-to-PLL hand-over, follow the receiver description; the
// discriminator formulas are standard choices of this design. The loop
// filters themselves run in the processor.
//
// Timing: in_valid with acc; out_valid one clock later with all errors.
// clear forgets the previous prompt pair (the FLL error of the first dump
// after clear is 0).
module loop_discriminators
  import gps_pkg::*;
#(
  parameter int ERR_W = 2 * ACC_W + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    mode,     // 0: FLL, 1: PLL
  input  logic                    in_valid,
  input  epl_t                    acc,
  output logic                    out_valid,
  output logic signed [ERR_W-1:0] dll_err,
  output logic signed [ERR_W-1:0] pll_err,
  output logic signed [ERR_W-1:0] fll_err,
  output logic signed [ERR_W-1:0] carr_err
);
  typedef logic signed [ERR_W-1:0] err_t;

  acc_t ip_prev, qp_prev;
  logic have_prev;

  err_t ie, qe, il, ql, ip, qp, ip1, qp1;
  err_t e_pow, l_pow, xprod, dot, pll_n, fll_n;
  always_comb begin
    ie  = ERR_W'(acc.ie);
    qe  = ERR_W'(acc.qe);
    il  = ERR_W'(acc.il);
    ql  = ERR_W'(acc.ql);
    ip  = ERR_W'(acc.ip);
    qp  = ERR_W'(acc.qp);
    ip1 = ERR_W'(ip_prev);
    qp1 = ERR_W'(qp_prev);
    e_pow = ie * ie + qe * qe;
    l_pow = il * il + ql * ql;
    xprod = ip1 * qp - qp1 * ip;
    dot   = ip1 * ip + qp1 * qp;
    pll_n = ip * qp;
    fll_n = !have_prev ? '0 : (dot < 0) ? -xprod : xprod;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      ip_prev   <= '0;
      qp_prev   <= '0;
      have_prev <= 1'b0;
      out_valid <= 1'b0;
      dll_err   <= '0;
      pll_err   <= '0;
      fll_err   <= '0;
      carr_err  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dll_err   <= e_pow - l_pow;
        pll_err   <= pll_n;
        fll_err   <= fll_n;
        carr_err  <= mode ? pll_n : fll_n;
        ip_prev   <= acc.ip;
        qp_prev   <= acc.qp;
        have_prev <= 1'b1;
      end
    end
  end
endmodule
