// approx_arith_lib: the characterized 16-bit approximate arithmetic library,
// one instance of each circuit, all fed by the same operand pair.
//
// Every adder and multiplier sits at the precision that removes the delay
// guard-band at a 70 C corner (the high-performance choice where one exists,
// otherwise the low-power one), so the outputs can be compared side by side
// against the exact sum and product. Unsigned circuits read a and b as
// unsigned; the Booth multipliers read them as two's complement.
// Combinational.
module approx_arith_lib (
  input  logic [15:0] a,
  input  logic [15:0] b,
  // adders, 17-bit sums
  output logic [16:0] s_loa,    // LOA-10
  output logic [16:0] s_trua,   // TruA-9
  output logic [16:0] s_esa,    // ESA-6
  output logic [16:0] s_etaii,  // ETAII-3
  output logic [16:0] s_scsa,   // SCSA-3
  output logic [16:0] s_aca,    // ACA-4
  output logic [16:0] s_acaa,   // ACAA-3
  output logic [16:0] s_csa,    // CSA-5
  output logic [16:0] s_gcsa,   // GCSA-6
  output logic [16:0] s_cspa,   // CSPA-5
  output logic [16:0] s_cca,    // CCA-6
  // unsigned multipliers, 32-bit products
  output logic [31:0] p_trum,   // TruM-7
  output logic [31:0] p_am1,    // AM1-11
  output logic [31:0] p_tam1,   // TAM1-16
  output logic [31:0] p_tam2,   // TAM2-16
  output logic [31:0] p_ppam,   // PPAM-J1K11
  output logic [31:0] p_udm,    // UDM
  output logic [31:0] p_icm,    // ICM
  // signed multipliers
  output logic signed [31:0] p_tbm,  // TBM-7
  output logic signed [31:0] p_bbm   // BBM-8
);
  loa_adder   #(.N(16), .K(10)) u_loa   (.a, .b, .sum(s_loa));
  trua_adder  #(.N(16), .K(9))  u_trua  (.a, .b, .sum(s_trua));
  esa_adder   #(.N(16), .K(6))  u_esa   (.a, .b, .sum(s_esa));
  etaii_adder #(.N(16), .K(3))  u_etaii (.a, .b, .sum(s_etaii));
  scsa_adder  #(.N(16), .K(3))  u_scsa  (.a, .b, .sum(s_scsa));
  aca_adder   #(.N(16), .K(4))  u_aca   (.a, .b, .sum(s_aca));
  acaa_adder  #(.N(16), .K(3))  u_acaa  (.a, .b, .sum(s_acaa));
  csa_adder   #(.N(16), .K(5))  u_csa   (.a, .b, .sum(s_csa));
  gcsa_adder  #(.N(16), .K(6))  u_gcsa  (.a, .b, .sum(s_gcsa));
  cspa_adder  #(.N(16), .K(5))  u_cspa  (.a, .b, .sum(s_cspa));
  cca_adder   #(.N(16), .K(6))  u_cca   (.a, .b, .sum(s_cca));

  trum_mult #(.N(16), .T(7))                            u_trum (.a, .b, .p(p_trum));
  am_mult   #(.N(16), .M(11), .SCHEME(1), .TCOLS(0))    u_am1  (.a, .b, .p(p_am1));
  am_mult   #(.N(16), .M(16), .SCHEME(1), .TCOLS(16))   u_tam1 (.a, .b, .p(p_tam1));
  am_mult   #(.N(16), .M(16), .SCHEME(2), .TCOLS(16))   u_tam2 (.a, .b, .p(p_tam2));
  ppam_mult #(.N(16), .J(1), .K(11))                    u_ppam (.a, .b, .p(p_ppam));
  udm_mult  #(.N(16))                                   u_udm  (.a, .b, .p(p_udm));
  icm_mult  #(.N(16))                                   u_icm  (.a, .b, .p(p_icm));
  tbm_mult  #(.N(16), .T(7))                            u_tbm  (.a(signed'(a)), .b(signed'(b)), .p(p_tbm));
  bbm_mult  #(.N(16), .VBL(8))                          u_bbm  (.a(signed'(a)), .b(signed'(b)), .p(p_bbm));
endmodule
