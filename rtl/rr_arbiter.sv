// rr_arbiter: round-robin arbiter with hold.
//
// Picks one of N requesters, starting the search at the one after the last
// requester that was served, so every requester is served within N grants.
// If the chosen requester is not accepted downstream (ack_i low) it keeps the
// grant in the next cycle as long as it still requests: a slave that stalls,
// such as the APB bridge, then sees a stable request until it accepts it.
//
// Interface: req_i (one bit per requester), ack_i (the chosen request was
// accepted this cycle); gnt_o is one-hot, idx_o its index, valid_o high when
// any requester is chosen. Combinational from req_i to gnt_o; the pointer and
// the hold state change at the clock edge.
module rr_arbiter #(
  parameter int unsigned N  = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic [N-1:0]  req_i,
  input  logic          ack_i,
  output logic [N-1:0]  gnt_o,
  output logic [IW-1:0] idx_o,
  output logic          valid_o
);

  logic [IW-1:0] ptr_q, hold_idx_q;
  logic          hold_q;

  always_comb begin
    int unsigned c;
    c       = 0;
    idx_o   = '0;
    valid_o = 1'b0;
    if (hold_q && req_i[hold_idx_q]) begin
      idx_o   = hold_idx_q;
      valid_o = 1'b1;
    end else begin
      for (int unsigned k = 0; k < N; k++) begin
        c = (32'(ptr_q) + k) % N;
        if (!valid_o && req_i[c]) begin
          idx_o   = IW'(c);
          valid_o = 1'b1;
        end
      end
    end
    gnt_o = '0;
    if (valid_o) gnt_o[idx_o] = 1'b1;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ptr_q      <= '0;
      hold_q     <= 1'b0;
      hold_idx_q <= '0;
    end else begin
      hold_q <= valid_o && !ack_i;
      if (valid_o) hold_idx_q <= idx_o;
      if (valid_o && ack_i) ptr_q <= IW'((32'(idx_o) + 1) % N);
    end
  end

endmodule
