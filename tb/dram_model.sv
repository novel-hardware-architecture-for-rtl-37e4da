// dram_model: behavioural model of the off-chip next-hop DRAM (not
// synthesizable logic; it stands in for a commodity DRAM and its controller).
//
// One read is accepted at a time (req_valid && req_ready). Its data appears on
// rvalid/rdata T_ACC cycles after acceptance, and the next read is accepted
// T_RC cycles after the previous one: with an 8 ns clock, the defaults give
// the 64 ns random access and cycle time of the published design. The
// `hold` input keeps the DRAM from accepting requests (as a refresh would) so
// that testbenches can create back-pressure. Entries are written by the
// testbench directly into `mem`; unwritten entries read as 0.
module dram_model #(
  parameter int unsigned AW    = 25,
  parameter int unsigned NH_W  = 8,
  parameter int unsigned T_ACC = 8,
  parameter int unsigned T_RC  = 8
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            hold,
  input  logic            req_valid,
  output logic            req_ready,
  input  logic [AW-1:0]   req_addr,
  output logic            rvalid,
  output logic [NH_W-1:0] rdata
);

  logic [NH_W-1:0] mem [int];

  int unsigned busy;                 // cycles until the next request may start
  int unsigned due  [$];             // cycles left for each read in flight
  logic [NH_W-1:0] data_q [$];

  assign req_ready = (busy == 0) && !hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 0;
      rvalid <= 1'b0;
      rdata  <= '0;
      due.delete();
      data_q.delete();
    end else begin
      rvalid <= 1'b0;
      foreach (due[i]) due[i] = due[i] - 1;
      if (due.size() > 0 && due[0] == 0) begin
        rvalid <= 1'b1;
        rdata  <= data_q[0];
        void'(due.pop_front());
        void'(data_q.pop_front());
      end
      if (busy > 0) busy <= busy - 1;
      if (req_valid && req_ready) begin
        due.push_back(T_ACC - 1);
        data_q.push_back(mem.exists(int'(req_addr)) ? mem[int'(req_addr)] : '0);
        busy <= T_RC - 1;
      end
    end
  end

endmodule
