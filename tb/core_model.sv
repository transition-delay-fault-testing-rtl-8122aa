// core_model: behavioural stand-in for the logic of one die (the circuit
// under test), used by the testbenches only. It has N_CHAINS internal scan
// chains of L flops each (flop i = chain*L + position, position 0 nearest
// si) and a simple known next-state and output function:
//   capture:  ff[i] <= ff[(i+1) % NFF] ^ cin[i % N_IN]
//   cout[o]  = ff[o % NFF] ^ ff[(o+1) % NFF]
// Flops change only on a clock edge with ce set: shift when se is set,
// capture otherwise. Functions ff_next/cout_of let a testbench predict it.
module core_model #(
  parameter int N_CHAINS = 2,
  parameter int L        = 3,
  parameter int N_IN     = 4,
  parameter int N_OUT    = 4
) (
  input  logic                clk,
  input  logic                ce,
  input  logic                se,
  input  logic [N_CHAINS-1:0] si,
  output logic [N_CHAINS-1:0] so,
  input  logic [N_IN-1:0]     cin,
  output logic [N_OUT-1:0]    cout
);
  localparam int NFF = N_CHAINS * L;
  logic [NFF-1:0] ff;

  initial ff = '0;

  always @(posedge clk) begin
    if (ce) begin
      if (se) begin
        for (int k = 0; k < N_CHAINS; k++)
          for (int j = 0; j < L; j++)
            ff[k*L+j] <= (j == 0) ? si[k] : ff[k*L+j-1];
      end else begin
        for (int i = 0; i < NFF; i++)
          ff[i] <= ff[(i+1) % NFF] ^ cin[i % N_IN];
      end
    end
  end

  always_comb begin
    for (int k = 0; k < N_CHAINS; k++) so[k] = ff[k*L+L-1];
    for (int o = 0; o < N_OUT; o++) cout[o] = ff[o % NFF] ^ ff[(o+1) % NFF];
  end
endmodule
