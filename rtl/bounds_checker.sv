// bounds_checker: tells an encryption cache whether the fetch-stage program
// counter capability (PCC) is inside the enclave code section and whether
// the address of the current bus command is inside the cache's own enclave
// section (code section for the instruction cache, data section for the data
// cache). A region is [base, base + len); the sums are formed on 33 bits so
// that a region ending at the top of the address space does not wrap.
// Purely combinational. The checks follow the document; the half-open
// interval convention is this design's choice.
module bounds_checker (
  input  logic [31:0] pcc,
  input  logic [31:0] addr,
  input  logic [31:0] code_base,
  input  logic [31:0] code_len,
  input  logic [31:0] sec_base,
  input  logic [31:0] sec_len,
  output logic        pcc_in,
  output logic        addr_in
);
  logic [32:0] code_end, sec_end;
  assign code_end = {1'b0, code_base} + {1'b0, code_len};
  assign sec_end  = {1'b0, sec_base} + {1'b0, sec_len};
  assign pcc_in   = (pcc >= code_base) && ({1'b0, pcc} < code_end);
  assign addr_in  = (addr >= sec_base) && ({1'b0, addr} < sec_end);
endmodule
