// Signature-protected memory for branch-metric decisions and survivor paths.
//
// A 2^(AYW+AXW)-entry memory of DW-bit words addressed by a row y (AYW bits)
// and a column x (AXW bits). On a write the signature of the word is computed
// and stored with it (L = 1: one parity bit, so 4-bit entries become 5-bit;
// L = 2: odd/even interleaved parity, so 4-bit entries become 6-bit and any
// burst of two adjacent bit errors is caught). On a read the signature of the
// word read is recomputed and compared with the stored one.
// A fault in the address decoder returns a wrong but self-consistent word, so
// with REINF = 1 a separate one-bit memory, with its own address decoding,
// also keeps the parity of every word; a read whose parity disagrees with that
// copy is flagged too.
// Timing: synchronous write (we) and synchronous read (re): rd_valid,
// rd_data, rd_sig and rd_err appear one clock after re. The memory array is not
// reset; read only what has been written.
// The word/row/column sizes default to the published example; the read and
// write ports are this design's choice.
module sig_mem #(
  parameter int unsigned DW    = 4,
  parameter int unsigned AYW   = 3,
  parameter int unsigned AXW   = 4,
  parameter int unsigned L     = 1,
  parameter bit          REINF = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           we,
  input  logic [AYW-1:0] wy,
  input  logic [AXW-1:0] wx,
  input  logic [DW-1:0]  wd,
  input  logic           re,
  input  logic [AYW-1:0] ry,
  input  logic [AXW-1:0] rx,
  output logic           rd_valid,
  output logic [DW-1:0]  rd_data,
  output logic [L-1:0]   rd_sig,
  output logic           rd_err
);
  localparam int unsigned DEPTH = 1 << (AYW + AXW);

  // Main array: data word with its predicted signature.
  logic [DW+L-1:0] mem  [DEPTH];
  // Reinforcing array: predicted parity of each word, decoded separately.
  logic            pmem [DEPTH];

  logic [L-1:0] w_sig;
  sig_gen #(.W(DW), .L(L)) u_wsig (.d(wd), .s(w_sig));

  always_ff @(posedge clk) begin
    if (we) begin
      mem[{wy, wx}]  <= {w_sig, wd};
      pmem[{wy, wx}] <= ^wd;
    end
  end

  logic [DW+L-1:0] q;
  logic            q_par;
  always_ff @(posedge clk) begin
    if (re) begin
      q     <= mem[{ry, rx}];
      q_par <= pmem[{ry, rx}];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= re;
  end

  logic [L-1:0] r_sig;
  sig_gen #(.W(DW), .L(L)) u_rsig (.d(q[DW-1:0]), .s(r_sig));

  assign rd_data = q[DW-1:0];
  assign rd_sig  = q[DW+L-1:DW];
  assign rd_err  = rd_valid & ((r_sig != rd_sig) |
                               (REINF & ((^q[DW-1:0]) != q_par)));
endmodule
