// Saboteur scan chain: one saboteur per gate input of the device under test.
//
// The chain threads N_SITES saboteurs into a single shift register. Site 0 is
// the first after the scan input, so a 1 shifted in appears at site 0 after
// one scan step, at site 1 after two, and so on; shifting zeros behind it
// moves a single fault one site further per step. scan_out is the last
// site's scan flop. sig_in[i] is the fault-free value of gate input i as
// driven by the netlist and sig_out[i] is what the gate actually receives.
//
// As in the original platform: a chain of saboteurs running throughout the DUT with a
// global fault type. Own choice: site numbering in shift order and the
// single-clock scan enable (see saboteur).
module saboteur_chain
  import fi_pkg::*;
#(
  parameter int unsigned N_SITES = N_FAULT_SITES
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               scan_en,
  input  logic               scan_in,
  output logic               scan_out,
  input  fault_type_t        ft,
  input  logic [N_SITES-1:0] sig_in,
  output logic [N_SITES-1:0] sig_out
);

  logic [N_SITES:0] chain;  // chain[i] feeds site i; chain[i+1] is its flop

  assign chain[0] = scan_in;

  for (genvar i = 0; i < N_SITES; i++) begin : g_site
    saboteur u_sab (
      .clk     (clk),
      .rst     (rst),
      .scan_en (scan_en),
      .si      (chain[i]),
      .so      (chain[i+1]),
      .ft      (ft),
      .in      (sig_in[i]),
      .out     (sig_out[i])
    );
  end

  assign scan_out = chain[N_SITES];

endmodule
