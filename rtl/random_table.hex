6854a05304cbe1ae4629a381
51824fcb7b178fa3344c0a2c
6edde8afe9285b0e999b7dff
3b3734a7d706ad42b6c24394
8b6a96b6d874d5011e47675e
8e3eb53b6700f3b59b8ca1a6
c7f74a4ea875f50b6dca1a6a
6de045e4655a0c2779fc05e7
5fdeef31c9ef3911844106aa
71b11cf2e3416883dcf42a79
d0716e9c591be9164912cb93
9523009f301bac00b8363901
ab0d6af2f040db6afe40b331
22bcff256ef46a213043090d
733c8844ac9eaac8d099a907
fbc4feb1c042dbfcbf788645
cad8aa7087147f3ba7b11d7f
1f56fd0e2c31fb7d367a02a5
bbf54f50b0d380439da2df3f
4ff5bd209467bc48b5093e33
3acd283520b52242ccb5b6c7
8a5b2637dadbc80d8b46f8d9
f2d658bbd0e3f2e0d1fc43ec
2f4b937c39f1047274ecfc09
ce0fd5bca85e73547fbae0b8
362f221bcf62086288484ee0
814870e710136504afc643ac
f7ba8a77e1d2d11b6271ec4a
99363a4cb1dec802db131edf
89f96c32575a2a5408c7b977
3ffba69c64849aed6d4dcb1a
4e408cfeadb22fd3074f3d90
2c725d9ac499e2897cb93737
f98c4e11e2f45928fe9e3ebe
28fa1c1d83540a31d747acdb
e9b45315527fdeca78dd8bb5
e16b197907b5f273f7e81f6a
dbaf8a10bfb43e9602f7e3af
1407b557ac92f65071d2f219
5f827bf4331bd70bdc1b4c0b
622929474b743f5fffe63195
f81a62d8199545e1916a8178
f46fd1df294e3dea50eb30a8
78b4c41b71f90d84b9a109f1
890602ab1ee8107f5c8a669a
b29d5cf932f3ae9d10f3cdd6
02db616fec0c2d2220ea1079
35b689fa2be2f4f0a9ad397c
76df8abcdf37a454335da0ed
24583bd69cfdfbf2134b262e
615dc70069ef4c79f8422b29
0ee862d85435fd2b48941c5f
fa26b42ee0b6208186a97853
9558bfbf3d999425eb2537c7
319a16e0f0840bdaf98c32cc
c931b7b062c9bece5d39db70
3631d93da4e073f5e30d53a8
9c042b6e69b2a510ec0a31c0
7111202eeacb4aa23bb99865
f5ad330b98d1878985226ded
ab330e8707c53639315f9d42
260966d174d2c25443da80d2
0b80a3d7ecaa7ea919a7bf87
21f49b9104905bdece217c49
64c2e402dc52ff520efae589
e4116025eb35648c3123d6f6
9b51d3b39756938a2f8fdc7c
ffb21f92840cb7cb6c7a7362
367429037e454cedea88bb19
64bc76030d89c34d6533a58a
f39665d41d241de6263f04bd
898145fe1abccff2dd7aca9e
d5b5181ff3e94b52135bf083
802a442e619a249281e382b2
58235cf8175110f659a10cbc
8c7cf7ce69f67dcfeb89e0dd
6a4dcae95095a64956b05fd7
8eae014390d732797b7e1d00
72714651eeea726adbeffeb3
36665f17d084372dcb2eacdf
efdd2919afd4cff68c28d999
f96d3141158a8e82233f90a7
fb6e80605f0f405c603b2f1c
7c8c2c691fba09468d1a7272
af2d6dfbfac1861438a0ace8
d79f2a58b682260b7295eecd
6b530866c396a2fb9f33c854
dd0749bcdc64ce3fa7c30d54
a7fb134f6103c39796df190d
f33cc5a2bfdda64ff198309a
848ee47fc491fcf6bf63d795
7370793e3a1a2914c5acc6f4
58b9d35ad801411a2afd036e
c292259c8009e73fa46a2b37
f122df51de1a9e94b3b9886f
d1a3adacafee57509e18f434
533b89023440093437c80eb4
ac051d1136aa1967440350ab
d8bcce731a1be28f6f95b586
923389be6ce53eae0f895a09
7620cd8d819a656848f0639f
09f19843a962125f82be1d52
5859b941ad7f0699999261c3
622229f251829199394adeab
97d64858584d73fa37afcbcc
c2ba83299914bafb9e8787b6
7dee58ba5025815c4e5155fc
ed659a4fac304d07d4fb0e12
d855645b647dcff58b0282aa
9119e27d4148a851925984e6
0094811db534cf39dc961f8e
ccc19d452a502389804b82f4
4e83f93fffbbdd262376de02
c0a795b3ade697ba69d96de9
f9272ab936be4ad67fb6622d
3a81ba8f224f13a0d472d62e
785dcb7aeba8ece90cda75c4
70fc66e0743b299c91a10898
b4994b34ed5198856822a7dc
4cc1d5cf9caea20ac1e66863
aaf97c4074112f9758538a69
04589e7c576584c9e8d609bb
eec1c70aa15362815ddc7231
5992a89eaf0b39d7b97faef8
39070af12140d0169836dc1c
45d4dd7a4706f7eb34d827bb
fc43684e85449f78bea8cd50
9c950730fb95707f20568fa7
e11293527ea3cf5d28560bbf
349fce75fb4b19a27c4ea174
46c6205190fd45d835fbe093
6e57d78ebf115c000a123634
735c3751d4c1939976e99828
1461830859ba0d53fb376713
92e8dabe41d745d36e2f4417
641720d96b389dcee1a396c0
9b0c29989d855732818ba1b4
1a3ad2b1231b68ccf5010af4
4b64d41f6af831176080203a
c3df5594c70a13d4b8702e8d
01e01da4d64a3afa76a750bd
33dab1651cbee6ed4ca1e8b5
208239f8913ea700c0d4a135
ca734d4883fa260f803e351c
1cd73cefbaf0a1ab78f346ff
f29d859a36d8b9725c51f567
88461411a141656ae8e4a260
7b5f626b1081f6c585f42fb8
16c108fcb286135c2e3f93d8
2ffe1b9364544be9aa3e4dd1
d71a531257779270d61bdcd3
487b36494493aa92f25ec94b
251deee8deaf4709237ec789
d759606fa138aff9b01a2b99
11a0cc9617877c4ee51c64f2
6aebeb8f15e61f11d524a8bd
06b6ccb70f16b4d27ebaea41
8dbf7b1c0cf7f30b09c5036e
23114992c740a09f5716c8c3
00168bad49e95ef1af587e97
a38a10730e108d37ffda835d
45615ed3159cc24f958de1be
63c4283ed54e3321766ed9ae
b80838ffc003de0e082027cd
0e058e00b49f1ec58de31323
dd7d7f7f853d79b7d9c2cdb5
d2a7abcc39559d27c183dd5d
5dd6dc02f23ea729269a9a36
80f78904e1f70309cb512985
fcbe38f04f1087b9707e13bd
67e0500ad94f058cf4cf9e98
d08ebcbbc8ab1eeb20e29484
d2050369a135e5dbd5fbe365
100889f22859362a5ad9f4ba
277534e56e29f4f69ca224c1
c4684e6a20870dc38200cbcf
3ae977548c43ef1a3d98777d
a4a179e1d97ab45b30ad55e5
95ba653618aa57607ca02531
7a549d4009a2c442cf5dc90a
f8c21c82c2f4ff227c6eb903
3e6bc2c2fed1168cc28d4d9e
93a37d04b427905b14de80d7
fcbe3750a533008a0520d862
9b5f0ee1e9251d60f84f2042
047a1456347f4e94f26a8654
70987bc25afdeb99669b78ca
91f0df88b053418fdb1bf44e
80de940bdc34e5e788dac152
8fd9db9bf636773c902d8318
f6b81a7a27ecfa1b0c978aa6
3cb44fbbbd73367fd7f47ed9
49e5197e91bc07f18d11aa8b
340bcfa8068debd75f15397c
19ab1d678fb0368bbabacbef
7d7113c8f7f8e49ff8537349
2a904662a0ae5d729672389b
570f38a2a502fbc7bbe0df42
04d83ddaed6bc4961f0953dc
f0fef288023f08b17b0629a7
733f26ea2222aad51ce06c04
5cee7fc90f40045c877a436d
81a6f97551f0bd9e27bcf106
1cc0cba328178aaf396ef501
6512ef074dd1b9ecfcc4bc15
7443b408df7c74df7ef01f7c
d787b99a98288df465fa0e28
261aa0985845d65e40a42560
d7440250911543608b21512f
3ec36ce962cd2eff89d0a87a
f559adecf525ab88875a15d2
a4cedc0b86d94896a8e634f1
ad61fb47338f95c7a515b8d1
1976af82b22f4ba701bc281f
1d27bb5d126933451eb5860f
d9fb84371f97bd81c93366a2
1cd0a30b005385624f7fc182
731d61a566e0d4ade152457f
7aac413ea10741907492e08a
00d116e7720fa47cd516e237
f7e5384424ca6bf99d33522f
6392266d751c6a76798ff769
760e034be19844e38fc777fc
61831ebe311ad593f8bc1575
f942e71ac46994fc7a63339a
8d2d83f5718b65a3deff7472
7a59cbfb4a4e58986476a002
05e3a112e886dc584c89c535
f203561bb30279ac0da6df3c
c809c5f7ec4b31f2508b6008
7ab16a08da8d1893207aa6dd
8c0f298e450ad0e9d95da8b8
2418d7a985c3e7fc4d6c2d64
79e517586a1eb13cbf277beb
0a2598234d1fa24237d16c3b
988d2a458047b435a17cbcea
a70d613da98b3cb39152e59d
4ce00f694b8eeb4e6d547675
65ca471f0ddbbf88a18acbbf
ffa9bffd234b08180737e05c
7c8655618ed5a4f7358a9e97
99c24748f4e751a071ede440
ffac063ad00a88b6c0535a5d
7c91313da2855e23a939b4cb
e06657fb4c9a424e30ff7e4d
b41a1592fa302ea744012449
36644de36c0e9f5a8a2ef7a7
b58be54f5a47784a872264e6
941b0852d630cbc212626a06
b8239b28a2eabea57f2d367c
65fc25bc75563246acbd4686
44eee8b590d2ee96750fecdc
7c890fd0520d90d191896783
4b90c155afb2d68a9ab35df9
c241f34f1bfc77421323a39b
7ea6632cb34ae88cd6e98c94
