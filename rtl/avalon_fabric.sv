// avalon_fabric: connects the CPU's data master to the peripheral slaves.
//
// The master presents a word address. Its upper bits pick one of N_SLAVES
// windows of 2**AVS_ADDR_W words; the lower AVS_ADDR_W bits go to the slave as
// its register offset. Only the selected slave sees chipselect; read data and
// waitrequest come back from the selected slave through a multiplexer. An
// access outside every window completes at once and reads 0.
//
// Timing: purely combinational, no added latency; a slave's waitrequest
// stalls the master directly.
//
// The document only names the fabric (it is generated by the vendor's system
// builder); this address-decoding crossbar for a single master, and the
// window layout, are this design's own.
module avalon_fabric
  import imagic_pkg::*;
#(
  parameter int unsigned N_SLAVES = 5,
  parameter int unsigned SEL_W    = 3
) (
  input  logic [SEL_W+AVS_ADDR_W-1:0] m_address,
  input  logic                        m_read,
  input  logic                        m_write,
  input  logic [AVS_DATA_W-1:0]       m_writedata,
  output logic [AVS_DATA_W-1:0]       m_readdata,
  output logic                        m_waitrequest,
  output avs_req_t                    s_req [N_SLAVES],
  input  avs_rsp_t                    s_rsp [N_SLAVES]
);

  logic [SEL_W-1:0] sel;
  assign sel = m_address[SEL_W+AVS_ADDR_W-1:AVS_ADDR_W];

  always_comb begin
    m_readdata    = '0;
    m_waitrequest = 1'b0;
    for (int i = 0; i < N_SLAVES; i++) begin
      s_req[i].chipselect = (sel == SEL_W'(i)) && (m_read || m_write);
      s_req[i].read       = m_read;
      s_req[i].write      = m_write;
      s_req[i].address    = m_address[AVS_ADDR_W-1:0];
      s_req[i].writedata  = m_writedata;
      if (sel == SEL_W'(i)) begin
        m_readdata    = s_rsp[i].readdata;
        m_waitrequest = s_rsp[i].waitrequest;
      end
    end
  end

endmodule
