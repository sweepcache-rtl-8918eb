// nvm_model: behavioural model of the nonvolatile main memory (not synthesizable).
//
// A sparse line-granular memory: lines never written read as zero. A request is held
// until ack; a read takes RD_CYC cycles and a write WR_CYC cycles, and a write becomes
// visible atomically in its ack cycle. Contents survive power loss; the memory has no
// reset. Line reads and writes are the only operations.
module nvm_model
  import sweepcache_pkg::*;
#(
  parameter int unsigned RD_CYC = NVM_RD_CYC,
  parameter int unsigned WR_CYC = NVM_WR_CYC
) (
  input  logic   clk,
  input  logic   req,
  input  logic   we,
  input  laddr_t laddr,
  input  line_t  wdata,
  output logic   ack,
  output line_t  rdata
);

  line_t       mem [laddr_t];
  int unsigned cnt = 0;
  int unsigned writes = 0;

  function automatic line_t read_line(laddr_t a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  assign ack   = req && (cnt + 1 >= (we ? WR_CYC : RD_CYC));
  assign rdata = read_line(laddr);

  always @(posedge clk) begin
    if (ack && we) begin
      mem[laddr] = wdata;
      writes++;
    end
    if (!req || ack) cnt <= 0;
    else             cnt <= cnt + 1;
  end

endmodule
