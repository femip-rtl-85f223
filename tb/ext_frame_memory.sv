// ext_frame_memory: behavioural model of the external frame store that holds
// the filtered pixels of the two most recent frames (parity 0 and 1).
// It is not synthesizable design; testbenches use it in place of the real
// memory. The write port takes one word per clock. The read port accepts a
// request when req_ready is high (randomly withheld when STALLS is set) and
// returns the word LAT or more clocks later, always in request order.
module ext_frame_memory #(
  parameter int IMG_W  = 1024,
  parameter int IMG_H  = 1024,
  parameter int LAT    = 3,
  parameter bit STALLS = 1
) (
  input  logic        clk,
  input  logic        wr_valid,
  input  logic [31:0] wr_data,
  input  logic        wr_frame,
  input  logic [9:0]  wr_x,
  input  logic [9:0]  wr_y,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_frame,
  input  logic [9:0]  req_x,
  input  logic [9:0]  req_y,
  output logic        rsp_valid,
  output logic [31:0] rsp_data
);
  logic [31:0] mem [2][IMG_W*IMG_H];
  logic [31:0] pend_d [$];
  longint      pend_t [$];
  longint      cyc = 0;
  int          nreq = 0;

  function automatic logic [31:0] peek(input int f, input int y, input int x);
    return mem[f][y*IMG_W+x];
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (wr_valid) mem[wr_frame][int'(wr_y)*IMG_W+int'(wr_x)] <= wr_data;
    if (req_valid && req_ready) begin
      pend_d.push_back(mem[req_frame][int'(req_y)*IMG_W+int'(req_x)]);
      pend_t.push_back(cyc + 64'(LAT) + (STALLS ? 64'($urandom_range(0, 2)) : 64'(0)));
      nreq++;
    end
    rsp_valid <= 1'b0;
    if (pend_t.size() != 0 && pend_t[0] <= cyc) begin
      void'(pend_t.pop_front());
      rsp_data  <= pend_d.pop_front();
      rsp_valid <= 1'b1;
    end
    req_ready <= STALLS ? ($urandom_range(0, 4) != 0) : 1'b1;
  end

  initial begin
    req_ready = 1'b0;
    rsp_valid = 1'b0;
    rsp_data  = '0;
  end
endmodule
