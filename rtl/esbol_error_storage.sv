// esbol_error_storage: the write/store part of the error storage system,
// N storage blocks holding the learned inverse transfer function.
//
// Each entry S_n holds the feed-forward current the modulator should get
// when the setpoint equals breakpoint n. Reset and the `init` input load
// every entry with the ideal linear characteristic given by the document,
//   S_n = -I_max + (n-1)/(N-1) * 2*I_max,   n = 1..N,
// so that an unlearned storage is a unity feed-forward gain. A write adds
// the update value to one entry (S_n,k = S_n,k-1 + I_u). A preload
// port overwrites one entry with prior knowledge of the plant, as the
// document allows during initialisation. Priority: init, preload, update.
// Entries saturate at +/-S_LIM_MA (this design's choice).
//
// Two combinational read ports return the entries rd_idx and rd_idx+1
// (the two breakpoints around the setpoint). Writes take effect on the
// next clock edge. The storage is a register array, as the document counts
// its cost in FPGA logic elements.
module esbol_error_storage
  import esbol_pkg::*;
#(
  parameter int unsigned N        = 41,      // Table I
  parameter int unsigned I_MAX_MA = 50_000,  // Table I: 50 A
  parameter int unsigned S_LIM_MA = 100_000, // saturation of an entry
  localparam int unsigned IDX_W   = $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,       // reload the unity characteristic
  input  logic             upd_en,     // S[upd_idx] += upd_val
  input  logic [IDX_W-1:0] upd_idx,
  input  current_t         upd_val,
  input  logic             ld_en,      // S[ld_idx] = ld_val
  input  logic [IDX_W-1:0] ld_idx,
  input  current_t         ld_val,
  input  logic [IDX_W-1:0] rd_idx,     // 0..N-2
  output current_t         rd_lo,      // S[rd_idx]
  output current_t         rd_hi       // S[rd_idx+1]
);
  current_t mem [N];

  // Value of entry k (0-based) of the ideal linear characteristic.
  function automatic current_t ideal(input int unsigned k);
    return current_t'(-$signed(I_MAX_MA) + $signed((k * 2 * I_MAX_MA) / (N - 1)));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < N; k++) mem[k] <= ideal(k);
    end else if (init) begin
      for (int unsigned k = 0; k < N; k++) mem[k] <= ideal(k);
    end else if (ld_en) begin
      if (int'(ld_idx) < N) mem[ld_idx] <= ld_val;
    end else if (upd_en) begin
      if (int'(upd_idx) < N)
        mem[upd_idx] <= sat_current(48'(mem[upd_idx]) + 48'(upd_val), S_LIM_MA);
    end
  end

  always_comb begin
    rd_lo = '0;
    rd_hi = '0;
    if (int'(rd_idx) < N - 1) begin
      rd_lo = mem[rd_idx];
      rd_hi = mem[rd_idx + 1'b1];
    end
  end
endmodule
