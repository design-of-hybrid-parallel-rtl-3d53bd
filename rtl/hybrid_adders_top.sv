// hybrid_adders_top: the adder library side by side.
//
// Five independent combinational adders, each with its own ports:
//  * ks_*     Kogge-Stone prefix adder with carry-in (ks_adder)
//  * bk_*     Brent-Kung prefix adder (bk_adder)
//  * hrpx_*   HRPX hybrid adder: Brent-Kung low part, XNOR/OR ripple high
//             part, for a wide plus a narrow operand (hrpx_bk_adder)
//  * hmpe_bk_* and hmpe_ks_*  HMPE modulo 2^n-1 adders with a Brent-Kung or
//             Kogge-Stone prefix structure and an excess-1 unit
//             (hmpe_bk_adder, hmpe_ks_adder)
// The adders share no signals: they are alternative building blocks for the
// additions inside a residue-to-binary converter, which is not part of this
// design. There is no clock; every output settles combinationally from its
// own inputs. Parameter defaults are the sizes of the worked examples:
// 8-bit prefix adders, an 18-bit HRPX adder with an 8-bit prefix part and
// 8-bit HMPE adders (modulus 255).
module hybrid_adders_top #(
  parameter int unsigned KS_WIDTH          = 8,
  parameter int unsigned BK_WIDTH          = 8,
  parameter int unsigned HRPX_WIDTH        = 18,
  parameter int unsigned HRPX_PREFIX_WIDTH = 8,
  parameter int unsigned HMPE_WIDTH        = 8
) (
  // Kogge-Stone adder
  input  logic [KS_WIDTH-1:0]          ks_a,
  input  logic [KS_WIDTH-1:0]          ks_b,
  input  logic                         ks_cin,
  output logic [KS_WIDTH-1:0]          ks_sum,
  output logic                         ks_cout,
  // Brent-Kung adder
  input  logic [BK_WIDTH-1:0]          bk_a,
  input  logic [BK_WIDTH-1:0]          bk_b,
  output logic [BK_WIDTH-1:0]          bk_sum,
  output logic                         bk_cout,
  // HRPX hybrid adder
  input  logic [HRPX_WIDTH-1:0]        hrpx_a,
  input  logic [HRPX_PREFIX_WIDTH-1:0] hrpx_b,
  output logic [HRPX_WIDTH-1:0]        hrpx_sum,
  output logic                         hrpx_mid,
  // HMPE adder, Brent-Kung prefix structure
  input  logic [HMPE_WIDTH-1:0]        hmpe_bk_a,
  input  logic [HMPE_WIDTH-1:0]        hmpe_bk_b,
  output logic [HMPE_WIDTH-1:0]        hmpe_bk_sum,
  // HMPE adder, Kogge-Stone prefix structure
  input  logic [HMPE_WIDTH-1:0]        hmpe_ks_a,
  input  logic [HMPE_WIDTH-1:0]        hmpe_ks_b,
  output logic [HMPE_WIDTH-1:0]        hmpe_ks_sum
);

  ks_adder #(.N(KS_WIDTH)) u_ks (
    .a(ks_a), .b(ks_b), .cin(ks_cin), .sum(ks_sum), .cout(ks_cout)
  );

  bk_adder #(.N(BK_WIDTH)) u_bk (
    .a(bk_a), .b(bk_b), .sum(bk_sum), .cout(bk_cout)
  );

  hrpx_bk_adder #(
    .WIDTH       (HRPX_WIDTH),
    .PREFIX_WIDTH(HRPX_PREFIX_WIDTH)
  ) u_hrpx (
    .a(hrpx_a), .b(hrpx_b), .sum(hrpx_sum), .mid(hrpx_mid)
  );

  hmpe_bk_adder #(.N(HMPE_WIDTH)) u_hmpe_bk (
    .a(hmpe_bk_a), .b(hmpe_bk_b), .sum(hmpe_bk_sum)
  );

  hmpe_ks_adder #(.N(HMPE_WIDTH)) u_hmpe_ks (
    .a(hmpe_ks_a), .b(hmpe_ks_b), .sum(hmpe_ks_sum)
  );

endmodule
