// tbm: token-bit manager chip in its TBM08 configuration.
//
// Two cores, each reading one group of ROCs with its own L1A stack, and a
// DataKeeper that merges both 160 Mb/s core streams into one 4b/5b + NRZI
// coded 400 Mb/s link (10 bits per BX, see tbm_datakeeper). The command
// decoder recovers L1A, ROC reset and TBM reset from the module clock sent
// by the Pixel FEC; L1A goes to both cores, ROC reset is passed on to the
// ROCs, TBM reset clears the cores. All logic runs on BX clock enables.
// The partition into cores, stacks and DataKeeper follows the TBM
// description; the TBM09/TBM10 variants (four groups, two links) are not
// built.
module tbm (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce40,
  input  logic [1:0] mclk_pat,
  output logic       roc_reset,
  output logic [1:0] token_out,
  input  logic [1:0] token_in,
  input  logic [1:0] roc_valid,
  input  logic [1:0][3:0] roc_nib,
  output logic [9:0] link,
  output logic       bad_cmd
);
  logic l1a, tbm_reset;
  logic [1:0] cv;
  logic [1:0][3:0] cn;

  tbm_cmd_decoder u_cmd (
    .clk, .rst_n, .ce40, .mclk_pat, .l1a, .roc_reset, .tbm_reset, .bad_cmd
  );

  for (genvar c = 0; c < 2; c++) begin : g_core
    tbm_core u_core (
      .clk, .rst_n, .ce40, .l1a, .tbm_reset,
      .token_out(token_out[c]), .token_in(token_in[c]),
      .roc_valid(roc_valid[c]), .roc_nib(roc_nib[c]),
      .out_valid(cv[c]), .out_nib(cn[c]), .readout_busy()
    );
  end

  tbm_datakeeper u_dk (
    .clk, .rst_n, .ce40,
    .a_valid(cv[0]), .a_nib(cn[0]), .b_valid(cv[1]), .b_nib(cn[1]), .link
  );
endmodule
