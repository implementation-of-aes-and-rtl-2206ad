// aes_vectors_pkg: known-answer AES vectors shared by the AES testbenches: the
// three examples of FIPS-197 Appendix C and random vectors from a software
// AES. The key is left-aligned in 256 bits; ks is 0/1/2 for 128/192/256-bit keys.
package aes_vectors_pkg;
  typedef struct packed { logic [1:0] ks; logic [255:0] key; logic [127:0] pt, ct; } aes_vec_t;
  localparam int unsigned N_AES_VEC = 12;
  localparam aes_vec_t AES_VEC [N_AES_VEC] = '{
    '{2'd0, 256'h000102030405060708090a0b0c0d0e0f00000000000000000000000000000000,
      128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a},
    '{2'd1, 256'h000102030405060708090a0b0c0d0e0f10111213141516170000000000000000,
      128'h00112233445566778899aabbccddeeff, 128'hdda97ca4864cdfe06eaf70a0ec0d7191},
    '{2'd2, 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f,
      128'h00112233445566778899aabbccddeeff, 128'h8ea2b7ca516745bfeafc49904b496089},
    '{2'd0, 256'hc5338aebdc8c3b678358f3d8935a75e800000000000000000000000000000000, 128'h44a88c9bf5ba0162c8dbd2f4e2f0bd83, 128'h5fe26df5ddfe3d60e8b2423cbd5e6343},
    '{2'd0, 256'hcf2184c78f346df30e7bde5d918d33f000000000000000000000000000000000, 128'h81697cd05b6a5800898a9fc99c547599, 128'h02a82982ddcc81085c1007029d8d55aa},
    '{2'd0, 256'h07cd3aa22d8c952edc17cc8dccd9d1ee00000000000000000000000000000000, 128'h4108d7f1ac1215de047303c1c1473f44, 128'h14604f47c7c646c91dd2ba9c99716f3c},
    '{2'd1, 256'h1ccc9f2f584a112a284187f32ba845a5b64b74b3527f791d0000000000000000, 128'h064f62576bcb30421b40e6ba82fa35f7, 128'hf6c56ff5391aef5973af87605efbe764},
    '{2'd1, 256'h9b6ed1f9053904652509b8f52972b481ad6d8bd538faf9a10000000000000000, 128'hccb184733986a60765ac93cd52a8a16d, 128'h0f5fd5575926826de4f029e2a154ed4c},
    '{2'd1, 256'h0fbc4c20f736e00c4e12db134feaf04cbe286a904021028f0000000000000000, 128'he0d90997d137f6e691752bd3dedef9c7, 128'he10140df739ad25effde1fdd5155630c},
    '{2'd2, 256'hb49f8209603358193492ace56e97317e1af0aa634b817f04539cdf66e6480428, 128'h33db53cffc90c822566d3644ac18d661, 128'h18ee8ca98312c700179e006052e94bf6},
    '{2'd2, 256'hee8c58eae1d6af887cc4fc883c10b90a15222b2ae9893644c2559981d7415e56, 128'h571d4a3cdef19ac7f4b7e37d22948dc5, 128'hbb1b736c07cfbd3ea180d5194b871a50},
    '{2'd2, 256'h1a520a681261ddfdc925d420571d9d96c8ed6013928c399014f3445de44b9088, 128'hec1d75e5461bc90bd34b039dab031769, 128'h1ef3827c888eade436329f38d8ae0efc}};
endpackage
