// taca_top: top level of the timing-aware configurable adder design.
//
// Two parts stand side by side:
//   * cnn_accel: the CNN accelerator whose 128 processing elements
//     accumulate with 16-bit TACAs, reached over AHB-Lite, with its
//     timing-error summary and the requests to the external adaptive voltage
//     regulator and adaptive clock generator brought out as ports;
//   * an N-bit ACFA adder configured by the improved configuration scheme
//     (ics_config + acfa_adder), the accuracy-configurable adder used for
//     image processing: k selects the approximation level, ics_pol the
//     polarity of the approximate bits. It is combinational.
module taca_top #(
  parameter int unsigned ICS_N = 16,
  localparam int unsigned KW   = $clog2(ICS_N + 1)
) (
  input  logic             hclk,
  input  logic             hresetn,
  input  logic             hsel,
  input  logic [31:0]      haddr,
  input  logic [1:0]       htrans,
  input  logic             hwrite,
  input  logic [2:0]       hsize,
  input  logic [31:0]      hwdata,
  input  logic             hready,
  output logic             hreadyout,
  output logic             hresp,
  output logic [31:0]      hrdata,
  output logic             timing_err,
  output logic             vdd_up_req,
  output logic             freq_down_req,
  output logic             busy,
  output logic             done,
  // ICS-configured approximate adder
  input  logic [ICS_N-1:0] ics_a,
  input  logic [ICS_N-1:0] ics_b,
  input  logic             ics_cin,
  input  logic [KW-1:0]    ics_k,
  input  logic             ics_pol,
  output logic [ICS_N-1:0] ics_sum,
  output logic             ics_cout,
  output logic [KW-1:0]    ics_m
);
  cnn_accel u_accel (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hreadyout, .hresp, .hrdata, .timing_err, .vdd_up_req, .freq_down_req,
    .busy, .done
  );

  logic [ICS_N-1:0] em, sm;

  ics_config #(.N(ICS_N)) u_ics (.k(ics_k), .sm_pol(ics_pol), .em(em), .sm(sm), .m(ics_m));

  acfa_adder #(.N(ICS_N)) u_add (
    .a(ics_a), .b(ics_b), .cin(ics_cin), .em(em), .sm(sm), .sum(ics_sum), .cout(ics_cout)
  );
endmodule
