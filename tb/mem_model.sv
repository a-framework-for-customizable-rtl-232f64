// Behavioural model of an off-chip memory read port (testbench only).
//
// Word-addressed array of DEPTH words. A request is accepted when
// req_valid_i and gnt_o are both high; its data returns LAT cycles later on
// rsp_valid_o / rsp_data_o, in request order. With STALL = 1 the grant is
// withheld on random cycles to model a busy memory. Testbenches fill the
// array through the hierarchical name mem. stall_cnt counts refused
// requests.
module mem_model #(
  parameter int unsigned MBW   = 32,
  parameter int unsigned AW    = 32,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned LAT   = 3,
  parameter bit          STALL = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           req_valid_i,
  input  logic [AW-1:0]  req_addr_i,
  output logic           gnt_o,
  output logic           rsp_valid_o,
  output logic [MBW-1:0] rsp_data_o
);

  logic [MBW-1:0] mem [DEPTH];
  logic           v_pipe [LAT];
  logic [MBW-1:0] d_pipe [LAT];
  int unsigned    stall_cnt;
  logic           gnt_q;

  assign gnt_o       = gnt_q;
  assign rsp_valid_o = v_pipe[LAT-1];
  assign rsp_data_o  = d_pipe[LAT-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        v_pipe[i] <= 1'b0;
        d_pipe[i] <= '0;
      end
      gnt_q     <= 1'b1;
      stall_cnt <= 0;
    end else begin
      gnt_q <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (req_valid_i && !gnt_q) stall_cnt <= stall_cnt + 1;
      v_pipe[0] <= req_valid_i && gnt_q;
      d_pipe[0] <= mem[req_addr_i % DEPTH];
      for (int i = 1; i < LAT; i++) begin
        v_pipe[i] <= v_pipe[i-1];
        d_pipe[i] <= d_pipe[i-1];
      end
    end
  end

endmodule
