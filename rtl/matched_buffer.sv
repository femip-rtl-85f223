// matched_buffer: FIFO of up to DEPTH (512) matched feature pairs.
//
// The correlation controller pushes each accepted pair; the host drains them
// through a valid/ready stream. A push into a full buffer is dropped and sets
// 'overflow', which stays set until reset. count is the current fill level.
module matched_buffer
  import femip_pkg::*;
#(
  parameter int DEPTH = 512
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  match_t                 push_data,
  output logic                   out_valid,
  output match_t                 out_data,
  input  logic                   out_ready,
  output logic [$clog2(DEPTH):0] count,
  output logic                   overflow
);
  localparam int A_W = $clog2(DEPTH);

  match_t         mem [DEPTH];
  logic [A_W-1:0] wp, rp;
  logic           do_push, do_pop;

  assign out_valid = (count != '0);
  assign out_data  = mem[rp];
  assign do_pop    = out_valid && out_ready;
  assign do_push   = push && (count < (A_W+1)'(DEPTH) || do_pop);

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (A_W+1)'(do_push) - (A_W+1)'(do_pop);
      if (push && !do_push) overflow <= 1'b1;
    end
  end
endmodule
