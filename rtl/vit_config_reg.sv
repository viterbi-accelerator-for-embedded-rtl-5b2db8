// Configuration register of the Viterbi accelerator.
//
// Holds the run-time code configuration: the constraint length k in use and
// the number of code outputs n per input bit (code rate 1/n). The accelerator
// is built for a maximum constraint length K; any k from 3 to K runs in full
// mode. In sub-state mode, for codes longer than K, software programs k = K
// so that the whole local output table serves as one portion. The control
// unit derives from k how many states a column holds, which is how the
// register steers the state addressing of the computational unit.
//
// Interface: written from DATA_IN[6:0] ({n, k}) in the cycle we is high;
// after reset it holds k = K, n = 2. Which fields the register has, their
// layout and the reset value are this design's choice; the register itself
// is part of the accelerator's block diagram.
module vit_config_reg
  import vit_pkg::*;
#(
  parameter int unsigned K     = 6,
  parameter int unsigned N_MAX = 4,
  parameter int unsigned K_MIN = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [CFG_W-1:0] din,
  output vit_cfg_t         cfg
);

  vit_cfg_t d;
  assign d = vit_cfg_t'(din);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.k <= 4'(K);
      cfg.n <= 3'd2;
    end else if (we) begin
      cfg <= d;
    end
  end

  // Software must program a configuration the hardware supports.
  a_legal_cfg: assert property (@(posedge clk) disable iff (!rst_n)
    we |-> (32'(d.k) >= K_MIN && 32'(d.k) <= K && d.n >= 3'd1 && 32'(d.n) <= N_MAX))
    else $error("vit_config_reg: unsupported configuration k=%0d n=%0d", d.k, d.n);

endmodule
